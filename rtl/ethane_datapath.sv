// ethane_datapath: hardware forwarding path of an Ethane flow switch.
//
// An Ethane switch forwards only flows a central controller has admitted.
// Each packet's header is reduced to a 155-bit flow tuple, hashed by two
// CRCs into two hash tables held in external SRAM, and compared with the
// stored tuples. A hit executes the entry's action (forward to a port, send
// to the CPU, or drop, optionally rewriting the MAC addresses) and updates
// the entry's packet and byte counters; a miss sends the packet to the CPU,
// whose software asks the controller and installs entries through the SRAM
// controller's CPU port.
//
// Pipeline, with the letters of the switch's block diagram:
//   RX stream -> A undersize_checker -+-> B header_parser -> C crc_hash
//                                     |     -> request FIFO -> D flow_lookup
//                                     |        <-> E sram_ctrl <-> SRAM P, Q
//                                     |     -> result FIFO --+
//                                     +-> F word_buffer -----+-> G hdr_overwrite_enq
//   G -> H..: one pkt_queue per port, J: pkt_queue to the CPU
//   K: pkt_queue from the CPU;  L rr_mux(port queues, K) -> TX stream
// The order of the blocks and their tasks follow the switch description.
// The word format, handshakes, FIFO depths between the stages, the SRAM
// memory map and the single shared RX and TX streams (one 64-bit word per
// cycle carrying a port tag; per-port MAC FIFOs sit outside) are this
// design's own.
//
// Timing: one lookup takes 14 cycles plus at most one cycle per 16 given to
// the CPU, so the pipeline sustains one packet per 16 cycles (3.9 Mpackets/s
// at 62.5 MHz) and one 64-bit word per cycle. A new packet is only accepted
// while the request FIFO has room, so headers never overrun the lookup.
module ethane_datapath
  import ethane_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 4,
  parameter int unsigned IDX_W       = 12,    // 2 x 4,096 = 8,192 flow entries
  parameter int unsigned AW          = 19,    // 512K words per SRAM bank
  parameter int unsigned RD_LAT      = 2,
  parameter int unsigned BUF_DEPTH   = 1024,
  parameter int unsigned QUEUE_DEPTH = 512,
  parameter int unsigned REQ_DEPTH   = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the Ethernet MAC RX FIFOs
  input  pkt_word_t     rx_word,
  input  logic          rx_valid,
  output logic          rx_ready,
  // to the Ethernet MAC TX FIFOs
  output pkt_word_t     tx_word,
  output logic          tx_valid,
  input  logic          tx_ready,
  // packets to the CPU (DMA over PCI)
  output pkt_word_t     cpu_rx_word,
  output logic          cpu_rx_valid,
  input  logic          cpu_rx_ready,
  // packets from the CPU, port field = egress port
  input  pkt_word_t     cpu_tx_word,
  input  logic          cpu_tx_valid,
  output logic          cpu_tx_ready,
  // CPU access to the flow table (32-bit words, register interface)
  input  logic          cpu_req,
  input  logic          cpu_we,
  input  logic [AW:0]   cpu_addr,
  input  logic [31:0]   cpu_wdata,
  output logic          cpu_gnt,
  output logic          cpu_rvalid,
  output logic [31:0]   cpu_rdata,
  // SRAM bank 0
  output logic          sram0_en,
  output logic          sram0_we,
  output logic [AW-1:0] sram0_addr,
  output logic [31:0]   sram0_wdata,
  input  logic [31:0]   sram0_rdata,
  // SRAM bank 1
  output logic          sram1_en,
  output logic          sram1_we,
  output logic [AW-1:0] sram1_addr,
  output logic [31:0]   sram1_wdata,
  input  logic [31:0]   sram1_rdata,
  // statistics
  output logic [31:0]   stat_undersize,
  output logic [31:0]   stat_hit,
  output logic [31:0]   stat_miss,
  output logic [31:0]   stat_fwd,
  output logic [31:0]   stat_to_cpu,
  output logic [31:0]   stat_null_drop,
  output logic [31:0]   stat_rewrite
);

  localparam int unsigned NQ = NUM_PORTS + 1;   // port queues + CPU queue

  // ---------------------------------------------------------------- A
  pkt_word_t a_word;
  logic      a_valid, a_ready, a_fire;
  logic      f_in_ready, req_room;

  undersize_checker u_a (
    .clk, .rst_n,
    .in_word (rx_word), .in_valid (rx_valid), .in_ready (rx_ready),
    .out_word(a_word),  .out_valid(a_valid),  .out_ready(a_ready),
    .drop_count(stat_undersize)
  );

  // A new packet enters only if its lookup request is sure to find room.
  assign a_ready = f_in_ready && (!a_word.sop || req_room);
  assign a_fire  = a_valid && a_ready;

  // ---------------------------------------------------------------- B, C
  logic             b_valid;
  flow_tuple_t      b_tuple;
  logic [LEN_W-1:0] b_len;
  logic             c_valid;
  lookup_req_t      c_req;

  header_parser u_b (
    .clk, .rst_n, .in_word(a_word), .in_fire(a_fire),
    .tuple_valid(b_valid), .tuple(b_tuple), .len(b_len)
  );

  crc_hash #(.IDX_W(IDX_W)) u_c (
    .clk, .rst_n, .in_valid(b_valid), .tuple(b_tuple), .len(b_len),
    .out_valid(c_valid), .req(c_req)
  );

  // ---------------------------------------------------------------- request FIFO
  localparam int unsigned REQ_W = $bits(lookup_req_t);
  logic [REQ_W-1:0]             rq_data;
  logic                         rq_empty, rq_full, rq_pop;
  logic [$clog2(REQ_DEPTH):0]   rq_count;

  sync_fifo #(.WIDTH(REQ_W), .DEPTH(REQ_DEPTH)) u_req_fifo (
    .clk, .rst_n, .wr_en(c_valid), .wr_data(c_req),
    .rd_en(rq_pop), .rd_data(rq_data), .empty(rq_empty), .full(rq_full),
    .count(rq_count)
  );
  // Up to two requests can be on their way through B and C.
  assign req_room = (int'(rq_count) + 3 <= REQ_DEPTH);

  // ---------------------------------------------------------------- D, E
  logic             d_req, d_we, d_gnt, d_rvalid;
  logic [AW-1:0]    d_addr;
  logic [63:0]      d_wdata, d_rdata;
  logic             res_valid, res_ready;
  lookup_result_t   res;

  flow_lookup #(.IDX_W(IDX_W), .AW(AW)) u_d (
    .clk, .rst_n,
    .req_valid(!rq_empty), .req(lookup_req_t'(rq_data)), .req_ready(rq_pop),
    .res_valid, .res, .res_ready,
    .m_req(d_req), .m_we(d_we), .m_addr(d_addr), .m_wdata(d_wdata),
    .m_gnt(d_gnt), .m_rvalid(d_rvalid), .m_rdata(d_rdata),
    .hit_count(stat_hit), .miss_count(stat_miss)
  );

  sram_ctrl #(.AW(AW), .RD_LAT(RD_LAT), .FRAME(16)) u_e (
    .clk, .rst_n,
    .d_req, .d_we, .d_addr, .d_wdata, .d_gnt, .d_rvalid, .d_rdata,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_gnt, .cpu_rvalid, .cpu_rdata,
    .s0_en(sram0_en), .s0_we(sram0_we), .s0_addr(sram0_addr),
    .s0_wdata(sram0_wdata), .s0_rdata(sram0_rdata),
    .s1_en(sram1_en), .s1_we(sram1_we), .s1_addr(sram1_addr),
    .s1_wdata(sram1_wdata), .s1_rdata(sram1_rdata)
  );

  // ---------------------------------------------------------------- result FIFO
  localparam int unsigned RES_W = $bits(lookup_result_t);
  logic [RES_W-1:0]           rs_data;
  logic                       rs_empty, rs_full, rs_pop;
  logic [$clog2(REQ_DEPTH):0] rs_count;

  sync_fifo #(.WIDTH(RES_W), .DEPTH(REQ_DEPTH)) u_res_fifo (
    .clk, .rst_n, .wr_en(res_valid), .wr_data(res),
    .rd_en(rs_pop), .rd_data(rs_data), .empty(rs_empty), .full(rs_full),
    .count(rs_count)
  );
  assign res_ready = !rs_full;

  // ---------------------------------------------------------------- F
  pkt_word_t f_word;
  logic      f_valid, f_ready;
  logic [$clog2(BUF_DEPTH):0] f_free;

  word_buffer #(.DEPTH(BUF_DEPTH)) u_f (
    .clk, .rst_n,
    .in_word(a_word), .in_valid(a_valid && a_ready), .in_ready(f_in_ready),
    .out_word(f_word), .out_valid(f_valid), .out_ready(f_ready),
    .free(f_free)
  );

  // ---------------------------------------------------------------- G
  pkt_word_t     g_word;
  logic [NQ-1:0] g_valid, g_ready;

  hdr_overwrite_enq #(.NUM_PORTS(NUM_PORTS)) u_g (
    .clk, .rst_n,
    .in_word(f_word), .in_valid(f_valid), .in_ready(f_ready),
    .res_valid(!rs_empty), .res(lookup_result_t'(rs_data)), .res_pop(rs_pop),
    .out_word(g_word), .out_valid(g_valid), .out_ready(g_ready),
    .fwd_count(stat_fwd), .cpu_count(stat_to_cpu), .drop_count(stat_null_drop),
    .rewrite_count(stat_rewrite)
  );

  // ---------------------------------------------------------------- H.., J, K
  pkt_word_t     l_word  [NQ];
  logic [NQ-1:0] l_valid, l_ready;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port_q
    logic [$clog2(QUEUE_DEPTH):0] cnt;
    logic                         avail;
    pkt_queue #(.DEPTH(QUEUE_DEPTH)) u_q (
      .clk, .rst_n,
      .in_word(g_word), .in_valid(g_valid[p]), .in_ready(g_ready[p]),
      .out_word(l_word[p]), .out_valid(l_valid[p]), .out_ready(l_ready[p]),
      .pkt_avail(avail), .pkt_count(cnt)
    );
  end

  logic [$clog2(QUEUE_DEPTH):0] j_cnt, k_cnt;
  logic                         j_avail, k_avail;

  pkt_queue #(.DEPTH(QUEUE_DEPTH)) u_j (
    .clk, .rst_n,
    .in_word(g_word), .in_valid(g_valid[NUM_PORTS]), .in_ready(g_ready[NUM_PORTS]),
    .out_word(cpu_rx_word), .out_valid(cpu_rx_valid), .out_ready(cpu_rx_ready),
    .pkt_avail(j_avail), .pkt_count(j_cnt)
  );

  pkt_queue #(.DEPTH(QUEUE_DEPTH)) u_k (
    .clk, .rst_n,
    .in_word(cpu_tx_word), .in_valid(cpu_tx_valid), .in_ready(cpu_tx_ready),
    .out_word(l_word[NUM_PORTS]), .out_valid(l_valid[NUM_PORTS]),
    .out_ready(l_ready[NUM_PORTS]),
    .pkt_avail(k_avail), .pkt_count(k_cnt)
  );

  // ---------------------------------------------------------------- L
  rr_mux #(.NIN(NQ)) u_l (
    .clk, .rst_n,
    .in_word(l_word), .in_valid(l_valid), .in_ready(l_ready),
    .out_word(tx_word), .out_valid(tx_valid), .out_ready(tx_ready)
  );

endmodule
