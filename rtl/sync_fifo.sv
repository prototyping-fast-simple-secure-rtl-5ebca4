// sync_fifo: small single-clock first-in first-out queue used between the
// stages of the Ethane datapath (lookup requests, lookup results).
//
// Show-ahead: rd_data is the oldest entry whenever empty is low; rd_en pops
// it. wr_en pushes wr_data; a push into a full queue is ignored, which the
// assertion below reports. count gives the occupancy so that a producer can
// stop early. Reset empties the queue. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp_q, rp_q;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (PW + 1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp_q <= wp_q + 1'b1;
      if (do_rd) rp_q <= rp_q + 1'b1;
      count <= count + (PW + 1)'(do_wr) - (PW + 1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);

endmodule
