// rr_mux: round-robin packet multiplexer (block L).
//
// Merges the output queues (the per-port queues and the queue of packets sent
// by the CPU) into the single word stream that feeds the Ethernet MAC TX
// FIFOs. The block diagram names it a round-robin MUX; this design makes the
// round robin packet-granular: once an input is chosen, its whole packet is
// sent before the next choice, and the search for the next input starts just
// after the one last served, so every input with a waiting packet is served
// within NIN packets.
//
// Interface: NIN show-ahead inputs (in_valid[i] high while input i has a
// complete packet at its head, in_ready[i] pops a word), one valid/ready
// output stream. Timing: one cycle to choose, then one word per cycle while
// out_ready is high.
module rr_mux
  import ethane_pkg::*;
#(
  parameter int unsigned NIN = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pkt_word_t        in_word  [NIN],
  input  logic [NIN-1:0]   in_valid,
  output logic [NIN-1:0]   in_ready,
  output pkt_word_t        out_word,
  output logic             out_valid,
  input  logic             out_ready
);

  localparam int unsigned SW = (NIN > 1) ? $clog2(NIN) : 1;

  logic          busy_q;
  logic [SW-1:0] sel_q;     // input being served, or last served when idle
  logic [SW-1:0] next_sel;
  logic          found;

  always_comb begin
    found    = 1'b0;
    next_sel = sel_q;
    for (int k = 1; k <= NIN; k++) begin
      int unsigned i;
      i = (int'(sel_q) + k) % NIN;
      if (!found && in_valid[i]) begin
        found    = 1'b1;
        next_sel = SW'(i);
      end
    end
  end

  always_comb begin
    in_ready  = '0;
    out_valid = busy_q && in_valid[sel_q];
    out_word  = in_word[sel_q];
    if (busy_q) in_ready[sel_q] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      sel_q  <= SW'(NIN - 1);
    end else if (!busy_q) begin
      if (found) begin
        busy_q <= 1'b1;
        sel_q  <= next_sel;
      end
    end else if (out_valid && out_ready && out_word.eop) begin
      busy_q <= 1'b0;
    end
  end

endmodule
