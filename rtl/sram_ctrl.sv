// sram_ctrl: flow-table SRAM controller (block E).
//
// The flow table lives in two external 32-bit SRAM banks that are accessed
// together as one 64-bit word (bank 0 = bits 31:0, bank 1 = bits 63:32).
// Two requestors share them: the flow-entry lookup/update block (64-bit
// reads and writes) and the CPU over PCI (one 32-bit word of one bank per
// access). That split, and the budget of "two entry reads, one counter
// update and one CPU access every 16 cycles", follow the switch
// description; the arbitration scheme is this design's own: a free-running
// FRAME-cycle slot counter gives the CPU priority in the last slot of every
// frame and the lookup block priority in all others, and either requestor
// may use a cycle the other leaves idle. The CPU is therefore guaranteed one
// access per 16 cycles, and the lookup block loses at most one cycle per
// frame.
//
// Timing: a request is granted in the cycle it is presented (gnt is
// combinational) and the address goes straight to the SRAM pins. Read data
// returns RD_LAT cycles later with rvalid to the requestor that issued it;
// reads return in issue order. The SRAM banks are assumed to be synchronous
// (pipelined) parts with a fixed read latency RD_LAT.
//
// CPU addressing: cpu_addr = {64-bit word address, bank}, so consecutive CPU
// word addresses walk bank 0 then bank 1 of each 64-bit word.
module sram_ctrl #(
  parameter int unsigned AW     = 19,   // 512K words per bank
  parameter int unsigned RD_LAT = 2,
  parameter int unsigned FRAME  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup / update requestor
  input  logic          d_req,
  input  logic          d_we,
  input  logic [AW-1:0] d_addr,
  input  logic [63:0]   d_wdata,
  output logic          d_gnt,
  output logic          d_rvalid,
  output logic [63:0]   d_rdata,
  // CPU requestor
  input  logic          cpu_req,
  input  logic          cpu_we,
  input  logic [AW:0]   cpu_addr,
  input  logic [31:0]   cpu_wdata,
  output logic          cpu_gnt,
  output logic          cpu_rvalid,
  output logic [31:0]   cpu_rdata,
  // SRAM bank 0 (bits 31:0)
  output logic          s0_en,
  output logic          s0_we,
  output logic [AW-1:0] s0_addr,
  output logic [31:0]   s0_wdata,
  input  logic [31:0]   s0_rdata,
  // SRAM bank 1 (bits 63:32)
  output logic          s1_en,
  output logic          s1_we,
  output logic [AW-1:0] s1_addr,
  output logic [31:0]   s1_wdata,
  input  logic [31:0]   s1_rdata
);

  logic [$clog2(FRAME)-1:0] slot_q;
  logic                     cpu_prio;

  assign cpu_prio = (slot_q == $clog2(FRAME)'(FRAME - 1));
  assign cpu_gnt  = cpu_req && (cpu_prio || !d_req);
  assign d_gnt    = d_req && !cpu_gnt;

  always_comb begin
    s0_en = 1'b0;  s0_we = 1'b0;  s0_addr = d_addr;  s0_wdata = d_wdata[31:0];
    s1_en = 1'b0;  s1_we = 1'b0;  s1_addr = d_addr;  s1_wdata = d_wdata[63:32];
    if (cpu_gnt) begin
      s0_addr  = cpu_addr[AW:1];
      s1_addr  = cpu_addr[AW:1];
      s0_wdata = cpu_wdata;
      s1_wdata = cpu_wdata;
      s0_en    = !cpu_addr[0];
      s1_en    =  cpu_addr[0];
      s0_we    = cpu_we && !cpu_addr[0];
      s1_we    = cpu_we &&  cpu_addr[0];
    end else if (d_gnt) begin
      s0_en = 1'b1;  s0_we = d_we;
      s1_en = 1'b1;  s1_we = d_we;
    end
  end

  // Read-return tags: who issued the read in flight at each pipeline stage.
  logic [RD_LAT-1:0] tag_d_q, tag_cpu_q, tag_bank_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q     <= '0;
      tag_d_q    <= '0;
      tag_cpu_q  <= '0;
      tag_bank_q <= '0;
    end else begin
      slot_q <= (slot_q == $clog2(FRAME)'(FRAME - 1)) ? '0 : slot_q + 1'b1;
      tag_d_q    <= RD_LAT'({tag_d_q, d_gnt && !d_we});
      tag_cpu_q  <= RD_LAT'({tag_cpu_q, cpu_gnt && !cpu_we});
      tag_bank_q <= RD_LAT'({tag_bank_q, cpu_addr[0]});
    end
  end

  assign d_rvalid   = tag_d_q[RD_LAT-1];
  assign d_rdata    = {s1_rdata, s0_rdata};
  assign cpu_rvalid = tag_cpu_q[RD_LAT-1];
  assign cpu_rdata  = tag_bank_q[RD_LAT-1] ? s1_rdata : s0_rdata;

  // A grant only goes to a requestor that asks, and never to both.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
    !(d_gnt && cpu_gnt) && (d_gnt -> d_req) && (cpu_gnt -> cpu_req));

endmodule
