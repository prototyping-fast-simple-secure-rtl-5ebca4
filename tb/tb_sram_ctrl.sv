// tb_sram_ctrl: runs the SRAM controller against two SRAM bank models with
// both requestors busy at once. The lookup side writes and reads back 64-bit
// words; the CPU side writes 32-bit words into its own region, reads them
// back and also reads single halves of the lookup side's words. All read
// data is compared with a reference memory. Checks that the CPU waits at
// most 16 cycles for a grant while the lookup side requests every cycle, and
// that the lookup side still gets at least 15 of every 16 cycles.
module tb_sram_ctrl;
  localparam int AW = 10, RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          d_req, d_we, d_gnt, d_rvalid;
  logic [AW-1:0] d_addr;
  logic [63:0]   d_wdata, d_rdata;
  logic          cpu_req, cpu_we, cpu_gnt, cpu_rvalid;
  logic [AW:0]   cpu_addr;
  logic [31:0]   cpu_wdata, cpu_rdata;
  logic          s0_en, s0_we, s1_en, s1_we;
  logic [AW-1:0] s0_addr, s1_addr;
  logic [31:0]   s0_wdata, s1_wdata, s0_rdata, s1_rdata;
  int checks = 0, failures = 0;

  sram_ctrl #(.AW(AW), .RD_LAT(RD_LAT), .FRAME(16)) dut (.*);
  sram_bank_model #(.AW(AW), .RD_LAT(RD_LAT)) u_b0 (.clk, .en(s0_en), .we(s0_we),
    .addr(s0_addr), .wdata(s0_wdata), .rdata(s0_rdata));
  sram_bank_model #(.AW(AW), .RD_LAT(RD_LAT)) u_b1 (.clk, .en(s1_en), .we(s1_we),
    .addr(s1_addr), .wdata(s1_wdata), .rdata(s1_rdata));

  typedef struct { logic we; logic [AW:0] addr; logic [63:0] data; } op_t;
  op_t dq[$], cq[$];
  logic [63:0] d_exp[$];
  logic [31:0] c_exp[$];
  logic [31:0] ref_mem [2**(AW+1)];   // index {word, bank}

  // lookup-side source
  always @(posedge clk) begin
    if (!rst_n) d_req <= 1'b0;
    else if (!d_req || d_gnt) begin
      if (dq.size() != 0) begin
        op_t o;
        o = dq.pop_front();
        d_req <= 1'b1; d_we <= o.we; d_addr <= o.addr[AW-1:0]; d_wdata <= o.data;
      end else d_req <= 1'b0;
    end
  end
  // CPU-side source
  always @(posedge clk) begin
    if (!rst_n) cpu_req <= 1'b0;
    else if (!cpu_req || cpu_gnt) begin
      if (cq.size() != 0) begin
        op_t o;
        o = cq.pop_front();
        cpu_req <= 1'b1; cpu_we <= o.we; cpu_addr <= o.addr; cpu_wdata <= o.data[31:0];
      end else cpu_req <= 1'b0;
    end
  end

  // reference memory, read expectations, grant statistics
  int cpu_wait = 0, max_wait = 0, d_busy = 0, d_granted = 0;
  always @(posedge clk) if (rst_n) begin
    if (d_req && d_gnt) begin
      if (d_we) begin
        ref_mem[{d_addr, 1'b0}] = d_wdata[31:0];
        ref_mem[{d_addr, 1'b1}] = d_wdata[63:32];
      end else d_exp.push_back({ref_mem[{d_addr, 1'b1}], ref_mem[{d_addr, 1'b0}]});
    end
    if (cpu_req && cpu_gnt) begin
      if (cpu_we) ref_mem[cpu_addr] = cpu_wdata;
      else c_exp.push_back(ref_mem[cpu_addr]);
    end
    if (d_req && cpu_req) begin
      d_busy++;
      if (d_gnt) d_granted++;
    end
    if (cpu_req && !cpu_gnt) cpu_wait++;
    else cpu_wait = 0;
    if (cpu_wait > max_wait) max_wait = cpu_wait;
    if (d_rvalid) begin
      checks++;
      if (d_exp.size() == 0 || d_rdata != d_exp[0]) begin
        failures++; $display("lookup read mismatch %h", d_rdata);
      end
      if (d_exp.size() != 0) void'(d_exp.pop_front());
    end
    if (cpu_rvalid) begin
      checks++;
      if (c_exp.size() == 0 || cpu_rdata != c_exp[0]) begin
        failures++; $display("cpu read mismatch %h", cpu_rdata);
      end
      if (c_exp.size() != 0) void'(c_exp.pop_front());
    end
  end

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) dq.push_back('{1'b1, (AW+1)'(i), {$urandom, $urandom}});
    for (int i = 0; i < 64; i++) dq.push_back('{1'b0, (AW+1)'(i), 64'h0});
    for (int i = 0; i < 32; i++) cq.push_back('{1'b1, (AW+1)'(1024 + i), 64'($urandom)});
    for (int i = 0; i < 32; i++) cq.push_back('{1'b0, (AW+1)'(1024 + i), 64'h0});
    for (int i = 0; i < 16; i++) cq.push_back('{1'b0, (AW+1)'(i), 64'h0});
    while (dq.size() != 0 || cq.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    checks += 4;
    if (max_wait > 15) begin failures++; $display("cpu waited %0d cycles", max_wait); end
    if (d_granted * 16 < d_busy * 15) begin
      failures++; $display("lookup got %0d of %0d contended cycles", d_granted, d_busy);
    end
    if (d_exp.size() != 0 || c_exp.size() != 0) begin failures++; $display("reads lost"); end
    if (d_busy < 32) begin failures++; $display("too little contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
