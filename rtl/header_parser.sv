// header_parser: packet header parser (block B).
//
// Watches the accepted word stream after the undersize checker and builds
// one 155-bit flow tuple per packet: lower 16 bits of MAC DA and MAC SA,
// Ethertype, IPv4 source and destination, IP protocol, TCP/UDP source and
// destination ports and the 3-bit ingress port, as the switch description
// lists them. The first HDR_WORDS words (80 bytes, enough for an IPv4 header
// with options followed by the TCP/UDP ports) are copied into a header
// buffer; the tuple is extracted from that buffer.
//
// This design's own reading of cases the description leaves open: a frame
// that is not IPv4 (Ethertype other than 0x0800) gets zero IP fields and
// ports; an IPv4 packet that is not TCP (6) or UDP (17), or whose header
// length field places the ports outside the buffer or beyond the frame, gets
// zero ports; no VLAN tag is parsed; bytes beyond the frame's length read as
// zero.
//
// Interface: in_word/in_fire is the stream word and its handshake (the
// parser never stalls the stream). tuple_valid pulses for one cycle, the
// cycle after the packet's last header word (word HDR_WORDS-1 or eop,
// whichever comes first); tuple and len are valid with it.
module header_parser
  import ethane_pkg::*;
#(
  parameter int unsigned HDR_WORDS = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pkt_word_t         in_word,
  input  logic              in_fire,
  output logic              tuple_valid,
  output flow_tuple_t       tuple,
  output logic [LEN_W-1:0]  len
);

  localparam int unsigned HDR_BYTES = HDR_WORDS * 8;
  localparam int unsigned WIDX_W    = $clog2(HDR_WORDS + 1);

  logic [DATA_W-1:0]  hdr_q [HDR_WORDS];
  logic [WIDX_W-1:0]  widx_q;      // index of the next word of this packet
  logic               done_q;      // tuple already emitted for this packet
  logic [LEN_W-1:0]   len_q;
  logic [PORT_W-1:0]  port_q;
  logic               emit_q;

  logic [WIDX_W-1:0]  widx;
  assign widx = in_word.sop ? '0 : widx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx_q <= '0;
      done_q <= 1'b1;
      len_q  <= '0;
      port_q <= '0;
      emit_q <= 1'b0;
    end else begin
      emit_q <= 1'b0;
      if (in_fire) begin
        if (in_word.sop) begin
          len_q  <= in_word.len;
          port_q <= in_word.port;
          done_q <= 1'b0;
        end
        if (widx < WIDX_W'(HDR_WORDS)) widx_q <= widx + 1'b1;
        if ((!done_q || in_word.sop) &&
            (in_word.eop || widx == WIDX_W'(HDR_WORDS - 1))) begin
          emit_q <= 1'b1;
          done_q <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire && widx < WIDX_W'(HDR_WORDS)) hdr_q[widx] <= in_word.data;
  end

  // Byte view of the header buffer, zero beyond the frame's end.
  logic [7:0] b [HDR_BYTES];
  always_comb begin
    for (int i = 0; i < HDR_BYTES; i++) begin
      b[i] = (i < int'(len_q)) ? hdr_q[i / 8][63 - 8 * (i % 8) -: 8] : 8'h00;
    end
  end

  logic [3:0]  ihl;
  int unsigned l4_off;
  logic        is_ipv4, has_ports;

  always_comb begin
    tuple           = '0;
    tuple.mac_da    = {b[4], b[5]};
    tuple.mac_sa    = {b[10], b[11]};
    tuple.ethertype = {b[12], b[13]};
    tuple.in_port   = port_q;
    is_ipv4   = (tuple.ethertype == 16'h0800);
    ihl       = b[14][3:0];
    l4_off    = 14 + 4 * int'(ihl);
    has_ports = 1'b0;
    if (is_ipv4) begin
      tuple.ip_proto = b[23];
      tuple.ip_src   = {b[26], b[27], b[28], b[29]};
      tuple.ip_dst   = {b[30], b[31], b[32], b[33]};
      has_ports = (b[23] == 8'd6 || b[23] == 8'd17) && ihl >= 4'd5 &&
                  (l4_off + 4 <= HDR_BYTES) && (l4_off + 4 <= int'(len_q));
      if (has_ports) begin
        tuple.l4_src = {b[l4_off],     b[l4_off + 1]};
        tuple.l4_dst = {b[l4_off + 2], b[l4_off + 3]};
      end
    end
  end

  assign tuple_valid = emit_q;
  assign len         = len_q;

endmodule
