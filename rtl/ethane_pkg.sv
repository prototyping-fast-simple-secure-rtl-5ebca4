// ethane_pkg: types and constants shared by the Ethane switch datapath.
//
// Packets move through the datapath as a stream of 64-bit words (byte 0 of
// the frame in data[63:56]). The first word of a packet carries sop, the last
// carries eop; the packet's byte length and its port number travel as
// sideband on every word and are only meaningful on the sop word. On the
// receive side the port is the ingress port, on the transmit side it is the
// egress port.
//
// The flow tuple (155 bits) and the flow-entry layout (155-bit tuple plus
// 152-bit action/statistics field = 307 bits) follow the switch's published
// description. How the 307 bits are laid out in the 320-bit SRAM slot, the
// port-number encoding and the CRC polynomials are this design's own choices.
package ethane_pkg;

  // ---------------------------------------------------------------- packets
  localparam int unsigned DATA_W = 64;   // datapath word
  localparam int unsigned LEN_W  = 16;   // packet byte length
  localparam int unsigned PORT_W = 3;    // physical port number
  localparam int unsigned MIN_PKT_BYTES = 64;

  typedef struct packed {
    logic              sop;
    logic              eop;
    logic [DATA_W-1:0] data;
    logic [LEN_W-1:0]  len;
    logic [PORT_W-1:0] port;
  } pkt_word_t;

  // ---------------------------------------------------------------- ports
  // 3-bit destination field of a flow entry: physical ports 0..5, the CPU,
  // or the null port (drop).
  localparam logic [PORT_W-1:0] DEST_CPU  = 3'd6;
  localparam logic [PORT_W-1:0] DEST_NULL = 3'd7;

  // ---------------------------------------------------------------- tuple
  localparam int unsigned TUPLE_W     = 155;
  localparam int unsigned TUPLE_PAD_W = 160;

  typedef struct packed {
    logic [15:0] mac_da;     // lower 16 bits of the destination MAC
    logic [15:0] mac_sa;     // lower 16 bits of the source MAC
    logic [15:0] ethertype;
    logic [31:0] ip_src;
    logic [31:0] ip_dst;
    logic [7:0]  ip_proto;
    logic [15:0] l4_src;
    logic [15:0] l4_dst;
    logic [2:0]  in_port;
  } flow_tuple_t;

  // ---------------------------------------------------------------- entry
  localparam int unsigned PKT_CNT_W  = 20;
  localparam int unsigned BYTE_CNT_W = 32;
  localparam int unsigned ACTION_W   = 152;
  localparam int unsigned ENTRY_W    = TUPLE_W + ACTION_W;   // 307
  localparam int unsigned SLOT_W     = 320;                  // SRAM slot
  localparam int unsigned SLOT_DW    = SLOT_W / 64;          // 5 x 64-bit words
  localparam int unsigned PAD_W      = SLOT_W - ENTRY_W;     // 13 spare bits

  // One SRAM slot; 64-bit word k of the slot is bits [319-64k -: 64]. The
  // spare bits sit just above the two statistics counters so that both
  // counters fall in the last word (word 4) and one 64-bit write updates them.
  typedef struct packed {
    flow_tuple_t           tuple;
    logic                  valid;
    logic [PORT_W-1:0]     dest;
    logic [47:0]           ow_mac_da;   // 0 = leave the field unchanged
    logic [47:0]           ow_mac_sa;   // 0 = leave the field unchanged
    logic [PAD_W-1:0]      pad;
    logic [PKT_CNT_W-1:0]  pkt_cnt;
    logic [BYTE_CNT_W-1:0] byte_cnt;
  } flow_slot_t;

  // Result of a lookup, handed from the lookup block to the header
  // overwrite/enqueue block.
  typedef struct packed {
    logic              hit;
    logic [PORT_W-1:0] dest;
    logic [47:0]       ow_mac_da;
    logic [47:0]       ow_mac_sa;
  } lookup_result_t;

  // Lookup request: tuple, two hash indices, packet length.
  typedef struct packed {
    flow_tuple_t       tuple;
    logic [15:0]       idx0;
    logic [15:0]       idx1;
    logic [LEN_W-1:0]  len;
  } lookup_req_t;

  // ---------------------------------------------------------------- hashing
  localparam logic [31:0] CRC_POLY_A = 32'h04C1_1DB7;  // CRC-32 (IEEE 802.3)
  localparam logic [31:0] CRC_POLY_B = 32'h1EDC_6F41;  // CRC-32C (Castagnoli)

  // MSB-first CRC-32 of a 160-bit word, register preset to all ones, no
  // reflection and no final inversion.
  function automatic logic [31:0] crc32_160(input logic [TUPLE_PAD_W-1:0] d,
                                            input logic [31:0] poly);
    logic [31:0] c;
    c = '1;
    for (int i = TUPLE_PAD_W - 1; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = (c << 1) ^ poly;
      else              c = c << 1;
    end
    return c;
  endfunction

endpackage
