// sram_bank_model: behavioural model of one external flow-table SRAM bank
// (32-bit words, 2**AW of them; 512K by default). Not synthesizable logic of
// the switch: the real part is a pipelined synchronous SRAM chip on the
// board.
//
// A read presented with en=1, we=0 at a rising edge returns its word on
// rdata RD_LAT rising edges later (rdata is meaningful only then). A write
// (en=1, we=1) takes effect at the edge. The array starts cleared, so every
// flow-table slot starts invalid.
module sram_bank_model #(
  parameter int unsigned AW     = 19,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem  [2**AW];
  logic [31:0] pipe [RD_LAT];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (pipe[i]) pipe[i] = '0;
  end

  always @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    pipe[0] <= (en && !we) ? mem[addr] : 32'h0;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[RD_LAT-1];

endmodule
