// undersize_checker: first stage of the receive path (block A).
//
// Every packet leaving the RX MAC FIFO is checked for a valid length: a
// packet whose byte length is below MIN_BYTES (64, the minimum Ethernet
// frame) is consumed and discarded word by word; all other packets pass
// through unchanged. The 64-byte threshold and the drop itself follow the
// switch description; the counter of dropped packets is this design's own
// addition for the management software.
//
// Interface: valid/ready word streams of ethane_pkg::pkt_word_t in and out.
// The length is taken from the sop word. The stage is combinational (zero
// latency); only the "dropping this packet" flag and the counter are state.
module undersize_checker
  import ethane_pkg::*;
#(
  parameter int unsigned MIN_BYTES = MIN_PKT_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pkt_word_t   in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output pkt_word_t   out_word,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] drop_count
);

  logic dropping_q;   // set while the rest of an undersize packet drains
  logic drop_now;

  assign drop_now  = in_word.sop ? (in_word.len < LEN_W'(MIN_BYTES)) : dropping_q;
  assign out_word  = in_word;
  assign out_valid = in_valid && !drop_now;
  assign in_ready  = drop_now ? 1'b1 : out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dropping_q <= 1'b0;
      drop_count <= '0;
    end else if (in_valid && in_ready) begin
      if (in_word.sop) begin
        dropping_q <= drop_now && !in_word.eop;
        if (drop_now) drop_count <= drop_count + 32'd1;
      end else if (in_word.eop) begin
        dropping_q <= 1'b0;
      end
    end
  end

endmodule
