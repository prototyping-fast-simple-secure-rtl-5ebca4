// word_buffer: packet word buffer (block F).
//
// Holds the words of every packet that passed the undersize check while its
// header goes through parsing, hashing and the flow-table lookup, so that the
// header overwrite/enqueue block can forward the packet once its lookup
// result is known. The buffering role follows the switch description; the
// depth (DEPTH words of 64 bits, 8 KB by default, room for five maximum-size
// frames) and the interface are this design's own.
//
// Interface: valid/ready stream of ethane_pkg::pkt_word_t in, show-ahead
// stream out (out_valid/out_word, popped by out_ready). in_ready is low when
// the buffer is full. free gives the number of empty words. One word per
// cycle in and out; a word written in one cycle can be read in the next.
module word_buffer
  import ethane_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  pkt_word_t              in_word,
  input  logic                   in_valid,
  output logic                   in_ready,
  output pkt_word_t              out_word,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [$clog2(DEPTH):0] free
);

  localparam int unsigned PW = $clog2(DEPTH);

  pkt_word_t     mem [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [PW:0]   used_q;
  logic          push, pop;

  assign in_ready  = (used_q != (PW + 1)'(DEPTH));
  assign out_valid = (used_q != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_word  = mem[rp_q];
  assign free      = (PW + 1)'(DEPTH) - used_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q   <= '0;
      rp_q   <= '0;
      used_q <= '0;
    end else begin
      if (push) wp_q <= wp_q + 1'b1;
      if (pop)  rp_q <= rp_q + 1'b1;
      used_q <= used_q + (PW + 1)'(push) - (PW + 1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= in_word;
  end

endmodule
