// pkt_queue: store-and-forward packet queue (blocks H, I, J, K: the queues
// to each output port, to the CPU and from the CPU).
//
// A FIFO of ethane_pkg::pkt_word_t words that also counts the complete
// packets it holds: a packet becomes visible at the output (pkt_avail) only
// once its eop word has been written, so the round-robin multiplexer or the
// CPU side can move it out without gaps. The queues are named in the
// switch's block diagram; their depth and this store-and-forward behaviour
// are this design's own choices.
//
// Interface: valid/ready stream in (in_ready low when full); show-ahead
// stream out, where out_valid is only high while a complete packet is at the
// head; out_ready pops a word. pkt_count is the number of complete packets
// held.
module pkt_queue
  import ethane_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  pkt_word_t              in_word,
  input  logic                   in_valid,
  output logic                   in_ready,
  output pkt_word_t              out_word,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic                   pkt_avail,
  output logic [$clog2(DEPTH):0] pkt_count
);

  localparam int unsigned PW = $clog2(DEPTH);

  pkt_word_t     mem [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [PW:0]   used_q;
  logic          push, pop, pkt_in, pkt_out;

  assign in_ready  = (used_q != (PW + 1)'(DEPTH));
  assign push      = in_valid && in_ready;
  assign pkt_avail = (pkt_count != '0);
  assign out_valid = pkt_avail;
  assign pop       = out_valid && out_ready;
  assign out_word  = mem[rp_q];
  assign pkt_in    = push && in_word.eop;
  assign pkt_out   = pop && out_word.eop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q      <= '0;
      rp_q      <= '0;
      used_q    <= '0;
      pkt_count <= '0;
    end else begin
      if (push) wp_q <= wp_q + 1'b1;
      if (pop)  rp_q <= rp_q + 1'b1;
      used_q    <= used_q + (PW + 1)'(push) - (PW + 1)'(pop);
      pkt_count <= pkt_count + (PW + 1)'(pkt_in) - (PW + 1)'(pkt_out);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= in_word;
  end

endmodule
