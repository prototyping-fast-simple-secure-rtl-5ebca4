// tb_flow_lookup: flow-entry lookup against the SRAM controller and two SRAM
// bank models holding a flow table written in by the testbench. Covers a hit
// in hash table 0, a hit in hash table 1 after a collision in table 0, a hit
// whose action is the CPU, a miss, and a stored but invalid entry. Checks
// every result, the packet and byte counters written back to SRAM, and the
// rate: with requests waiting and the CPU port busy every cycle, results
// must come at least every 16 cycles.
module tb_flow_lookup;
  import ethane_pkg::*;
  import tb_util_pkg::*;

  localparam int IDX_W = 12, AW = 16, RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, res_valid, res_ready;
  lookup_req_t     req;
  lookup_result_t  res;
  logic            m_req, m_we, m_gnt, m_rvalid;
  logic [AW-1:0]   m_addr;
  logic [63:0]     m_wdata, m_rdata;
  logic [31:0]     hit_count, miss_count;
  logic            cpu_req, cpu_gnt, cpu_rvalid;
  logic [31:0]     cpu_rdata;
  logic            s0_en, s0_we, s1_en, s1_we;
  logic [AW-1:0]   s0_addr, s1_addr;
  logic [31:0]     s0_wdata, s1_wdata, s0_rdata, s1_rdata;
  int checks = 0, failures = 0;

  flow_lookup #(.IDX_W(IDX_W), .AW(AW)) dut (.*);
  sram_ctrl #(.AW(AW), .RD_LAT(RD_LAT)) u_e (.clk, .rst_n,
    .d_req(m_req), .d_we(m_we), .d_addr(m_addr), .d_wdata(m_wdata), .d_gnt(m_gnt),
    .d_rvalid(m_rvalid), .d_rdata(m_rdata),
    .cpu_req, .cpu_we(1'b0), .cpu_addr({AW+1{1'b1}}), .cpu_wdata(32'h0), .cpu_gnt,
    .cpu_rvalid, .cpu_rdata,
    .s0_en, .s0_we, .s0_addr, .s0_wdata, .s0_rdata,
    .s1_en, .s1_we, .s1_addr, .s1_wdata, .s1_rdata);
  sram_bank_model #(.AW(AW), .RD_LAT(RD_LAT)) u_b0 (.clk, .en(s0_en), .we(s0_we),
    .addr(s0_addr), .wdata(s0_wdata), .rdata(s0_rdata));
  sram_bank_model #(.AW(AW), .RD_LAT(RD_LAT)) u_b1 (.clk, .en(s1_en), .we(s1_we),
    .addr(s1_addr), .wdata(s1_wdata), .rdata(s1_rdata));

  function automatic int slot_base(int table_, int idx);
    return (table_ * (1 << IDX_W) + idx) * 5;
  endfunction

  task automatic put_slot(int table_, int idx, logic [319:0] s);
    for (int k = 0; k < 5; k++) begin
      u_b0.mem[slot_base(table_, idx) + k] = s[319 - 64*k - 32 -: 32];
      u_b1.mem[slot_base(table_, idx) + k] = s[319 - 64*k -: 32];
    end
  endtask

  function automatic logic [63:0] counter_word(int table_, int idx);
    int a;
    a = slot_base(table_, idx) + 4;
    return {u_b1.mem[a], u_b0.mem[a]};
  endfunction

  flow_tuple_t t[6];
  lookup_result_t expq[$];
  lookup_req_t    rq[$];
  int exp_pkts[6], exp_bytes[6];

  always @(posedge clk) begin
    if (!rst_n) req_valid <= 1'b0;
    else if (!req_valid || req_ready) begin
      if (rq.size() != 0) begin req <= rq.pop_front(); req_valid <= 1'b1; end
      else req_valid <= 1'b0;
    end
  end

  int last_res = -1, cyc = 0, max_gap = 0, nres = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    cpu_req <= rst_n;           // CPU port busy all the time
    res_ready <= 1'b1;
    if (rst_n && res_valid) begin
      checks++;
      nres++;
      if (expq.size() == 0 || res != expq[0]) begin
        failures++; $display("result mismatch got %h", res);
      end
      if (expq.size() != 0) void'(expq.pop_front());
      if (last_res >= 0 && cyc - last_res > max_gap) max_gap = cyc - last_res;
      last_res = cyc;
    end
  end

  task automatic lookup(int i, int len);
    lookup_req_t r;
    lookup_result_t e;
    r.tuple = t[i];
    r.idx0  = 16'(hash_idx(t[i], CRC_POLY_A, IDX_W));
    r.idx1  = 16'(hash_idx(t[i], CRC_POLY_B, IDX_W));
    r.len   = 16'(len);
    rq.push_back(r);
    e = '0;
    case (i)
      0: begin e.hit = 1; e.dest = 3'd2; e.ow_mac_da = 48'h0200_0000_0001; end
      1: begin e.hit = 1; e.dest = DEST_CPU; end
      2: begin e.hit = 1; e.dest = 3'd1; e.ow_mac_sa = 48'h0200_0000_00aa; end
      default: begin e.hit = 0; e.dest = DEST_CPU; end
    endcase
    expq.push_back(e);
    if (i <= 2) begin exp_pkts[i]++; exp_bytes[i] += len; end
  endtask

  initial begin
    int i0, i1;
    foreach (t[i]) t[i] = flow_tuple_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    foreach (exp_pkts[i]) begin exp_pkts[i] = 0; exp_bytes[i] = 0; end
    // t0: table 0 hit with counters starting at 5 packets / 1000 bytes
    put_slot(0, hash_idx(t[0], CRC_POLY_A, IDX_W),
             make_slot(t[0], 1, 3'd2, 48'h0200_0000_0001, 48'h0, 20'd5, 32'd1000));
    exp_pkts[0] = 5; exp_bytes[0] = 1000;
    // t1: table 1 hit, action CPU
    put_slot(1, hash_idx(t[1], CRC_POLY_B, IDX_W),
             make_slot(t[1], 1, DEST_CPU, 48'h0, 48'h0, 20'd0, 32'd0));
    // t2: its table-0 slot holds t5 (a collision), real entry in table 1
    put_slot(0, hash_idx(t[2], CRC_POLY_A, IDX_W),
             make_slot(t[5], 1, 3'd3, 48'h0, 48'h0, 20'd0, 32'd0));
    put_slot(1, hash_idx(t[2], CRC_POLY_B, IDX_W),
             make_slot(t[2], 1, 3'd1, 48'h0, 48'h0200_0000_00aa, 20'hFFFFF, 32'd0));
    exp_pkts[2] = 20'hFFFFF;
    // t3: nothing stored -> miss; t4: stored but not valid -> miss
    put_slot(0, hash_idx(t[4], CRC_POLY_A, IDX_W),
             make_slot(t[4], 0, 3'd1, 48'h0, 48'h0, 20'd0, 32'd0));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 5; i++) lookup(i, 64 + 37 * r + i);
    while (expq.size() != 0 && cyc < 3000) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      logic [63:0] w;
      int tb_, ix;
      tb_ = (i == 0) ? 0 : 1;
      ix  = (i == 0) ? int'(hash_idx(t[i], CRC_POLY_A, IDX_W))
                     : int'(hash_idx(t[i], CRC_POLY_B, IDX_W));
      w = counter_word(tb_, ix);
      checks += 2;
      if (w[51:32] != 20'(exp_pkts[i])) begin
        failures++; $display("entry %0d packets %0d exp %0d", i, w[51:32], 20'(exp_pkts[i]));
      end
      if (w[31:0] != 32'(exp_bytes[i])) begin
        failures++; $display("entry %0d bytes %0d", i, w[31:0]);
      end
    end
    checks += 4;
    if (hit_count != 32'd24 || miss_count != 32'd16) begin
      failures++; $display("hit/miss counts %0d %0d", hit_count, miss_count);
    end
    if (max_gap > 16) begin failures++; $display("lookup took %0d cycles", max_gap); end
    if (expq.size() != 0) begin failures++; $display("results missing"); end
    if (nres != 40) failures++;
    $display("max cycles between results: %0d", max_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
