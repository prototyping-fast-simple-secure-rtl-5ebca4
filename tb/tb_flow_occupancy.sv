// tb_flow_occupancy: flow-table occupancy workload at the default table size
// (two hash tables of 4,096 slots, 8,192 entries). Two rounds, with 500 and
// then 1,500 concurrent flows: the number of flows the switch must hold for
// a small network and for the busiest hour of a large enterprise network.
//
// In each round the testbench acts as the switch software. For every flow it
// computes both CRC indices and writes the entry through the CPU flow-table
// port into table 0 if that slot is free, else into table 1, else it records
// a collision and keeps the flow for itself. The word holding the valid bit
// is written last. It then sends one 64-byte packet of every flow through
// the datapath and checks:
//   * each installed flow leaves on its entry's port, unchanged and in order;
//   * each collided flow reaches the CPU queue;
//   * the hit and miss counters agree;
//   * every installed entry's counters, read back over the CPU port, show
//     one packet of 64 bytes.
// The numbers of table-1 placements and collisions are reported. Between
// rounds the entries are removed by clearing all five words of each slot.
module tb_flow_occupancy;
  import ethane_pkg::*;
  import tb_util_pkg::*;

  localparam int IDX_W = 12, AW = 19, RD_LAT = 2, NP = 4;
  localparam int NSLOT = 2 << IDX_W;
  logic clk = 0, rst_n = 0;
  always #8 clk = ~clk;   // 62.5 MHz

  pkt_word_t   rx_word, tx_word, cpu_rx_word, cpu_tx_word;
  logic        rx_valid, rx_ready, tx_valid, tx_ready;
  logic        cpu_rx_valid, cpu_rx_ready, cpu_tx_valid, cpu_tx_ready;
  logic        cpu_req, cpu_we, cpu_gnt, cpu_rvalid;
  logic [AW:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic        sram0_en, sram0_we, sram1_en, sram1_we;
  logic [AW-1:0] sram0_addr, sram1_addr;
  logic [31:0] sram0_wdata, sram1_wdata, sram0_rdata, sram1_rdata;
  logic [31:0] stat_undersize, stat_hit, stat_miss, stat_fwd, stat_to_cpu,
               stat_null_drop, stat_rewrite;
  int checks = 0, failures = 0;

  ethane_datapath dut (.*);
  sram_bank_model #(.AW(AW), .RD_LAT(RD_LAT)) u_p (.clk, .en(sram0_en), .we(sram0_we),
    .addr(sram0_addr), .wdata(sram0_wdata), .rdata(sram0_rdata));
  sram_bank_model #(.AW(AW), .RD_LAT(RD_LAT)) u_q (.clk, .en(sram1_en), .we(sram1_we),
    .addr(sram1_addr), .wdata(sram1_wdata), .rdata(sram1_rdata));

  assign cpu_tx_valid = 1'b0;
  assign cpu_tx_word  = '0;
  assign cpu_rx_ready = 1'b1;
  assign tx_ready     = 1'b1;

  // ------------------------------------------------------------ CPU port
  typedef struct { logic we; logic [AW:0] addr; logic [31:0] data; } cop_t;
  cop_t        cq[$];
  logic [31:0] rq[$];
  int          reads_issued;

  always @(posedge clk) begin
    if (!rst_n) cpu_req <= 1'b0;
    else begin
      if (cpu_rvalid) rq.push_back(cpu_rdata);
      if (!cpu_req || cpu_gnt) begin
        if (cq.size() != 0) begin
          cop_t o;
          o = cq.pop_front();
          cpu_req <= 1'b1; cpu_we <= o.we; cpu_addr <= o.addr; cpu_wdata <= o.data;
        end else cpu_req <= 1'b0;
      end
    end
  end

  function automatic logic [AW:0] cpu_word(int w, int bank);
    return (AW+1)'({19'(w), 1'(bank)});
  endfunction

  // one 64-bit SRAM word as two 32-bit CPU writes
  task automatic write64(int w, logic [63:0] d);
    cq.push_back('{1'b1, cpu_word(w, 0), d[31:0]});
    cq.push_back('{1'b1, cpu_word(w, 1), d[63:32]});
  endtask

  // ------------------------------------------------------------ RX source
  pkt_word_t rx_q[$];
  always @(posedge clk) begin
    if (!rst_n) rx_valid <= 1'b0;
    else if (!rx_valid || rx_ready) begin
      if (rx_q.size() != 0) begin rx_word <= rx_q.pop_front(); rx_valid <= 1'b1; end
      else rx_valid <= 1'b0;
    end
  end

  // ------------------------------------------------------------ sinks
  pkt_word_t exp_tx [NP][$];
  pkt_word_t exp_cpu[$];

  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      int p;
      p = int'(tx_word.port);
      checks++;
      if (p >= NP || exp_tx[p].size() == 0 || tx_word != exp_tx[p][0]) begin
        failures++; $display("TX mismatch on port %0d", p);
      end
      if (p < NP && exp_tx[p].size() != 0) void'(exp_tx[p].pop_front());
    end
    if (rst_n && cpu_rx_valid && cpu_rx_ready) begin
      checks++;
      if (exp_cpu.size() == 0 || cpu_rx_word != exp_cpu[0]) begin
        failures++; $display("CPU RX mismatch");
      end
      if (exp_cpu.size() != 0) void'(exp_cpu.pop_front());
    end
  end

  // ------------------------------------------------------------ software model
  bit     occ [NSLOT];          // slot in use
  int     used_slots[$];        // slots installed this round
  frame_t flows[$];
  int     flow_slot[$];         // slot of each flow, -1 after a collision

  task automatic send(frame_t f, int slot, int dest);
    bytes_t b;
    int nw;
    build_bytes(f, b);
    nw = nwords(f.len);
    for (int w = 0; w < nw; w++) begin
      pkt_word_t x, e;
      x.sop = (w == 0); x.eop = (w == nw - 1);
      x.data = word_of(b, w); x.len = 16'(f.len); x.port = f.port;
      rx_q.push_back(x);
      e = x;
      if (slot >= 0) begin e.port = 3'(dest); exp_tx[dest].push_back(e); end
      else exp_cpu.push_back(e);
    end
  endtask

  task automatic wait_idle(int limit);
    int n;
    n = 0;
    while ((cq.size() != 0 || rx_q.size() != 0 || exp_cpu.size() != 0 ||
            exp_tx[0].size() != 0 || exp_tx[1].size() != 0 ||
            exp_tx[2].size() != 0 || exp_tx[3].size() != 0 ||
            rq.size() != reads_issued) && n < limit) begin
      @(posedge clk); n++;
    end
    repeat (20) @(posedge clk);
  endtask

  task automatic run_round(int nflows, int round);
    int t1, coll, hit0, miss0, bad_cnt;
    int dests[$];
    t1 = 0; coll = 0;
    flows.delete(); flow_slot.delete(); used_slots.delete();
    hit0 = int'(stat_hit); miss0 = int'(stat_miss);

    // install
    for (int i = 0; i < nflows; i++) begin
      frame_t f;
      flow_tuple_t t;
      int i0, i1, s, d;
      logic [319:0] sl;
      f = tcp_frame(48'h0000_0000_0b00 + 48'(i), 48'h0000_0000_0a00 + 48'(i),
                    {8'd10, 8'(round), 16'(i)}, $urandom(), 16'($urandom_range(1024, 65535)),
                    16'($urandom_range(1, 1023)), 64, 3'($urandom_range(0, NP - 1)));
      t  = exp_tuple(f);
      i0 = int'(hash_idx(t, CRC_POLY_A, IDX_W));
      i1 = int'(hash_idx(t, CRC_POLY_B, IDX_W));
      if (!occ[i0]) s = i0;
      else if (!occ[(1 << IDX_W) + i1]) begin s = (1 << IDX_W) + i1; t1++; end
      else begin s = -1; coll++; end
      d = int'($urandom_range(0, NP - 1));
      flows.push_back(f); flow_slot.push_back(s); dests.push_back(d);
      if (s >= 0) begin
        occ[s] = 1'b1;
        used_slots.push_back(s);
        sl = make_slot(t, 1'b1, 3'(d), 48'h0, 48'h0, 20'd0, 32'd0);
        for (int k = 0; k < 5; k++)
          if (k != 2) write64(s * 5 + k, sl[319 - 64*k -: 64]);
        write64(s * 5 + 2, sl[319 - 128 -: 64]);
      end
    end
    wait_idle(200000);

    // one packet per flow
    foreach (flows[i]) send(flows[i], flow_slot[i], dests[i]);
    wait_idle(400000);
    checks += 4;
    if (exp_cpu.size() != 0 || exp_tx[0].size() != 0 || exp_tx[1].size() != 0 ||
        exp_tx[2].size() != 0 || exp_tx[3].size() != 0) begin
      failures++; $display("packets missing after round %0d", round);
    end
    if (int'(stat_hit) - hit0 != nflows - coll) begin
      failures++; $display("hit count %0d, expected %0d", int'(stat_hit) - hit0, nflows - coll);
    end
    if (int'(stat_miss) - miss0 != coll) begin
      failures++; $display("miss count %0d, expected %0d", int'(stat_miss) - miss0, coll);
    end
    if (coll * 100 > nflows) begin
      failures++; $display("more than 1%% of the flows collided");
    end

    // counters of every installed entry: 1 packet, 64 bytes
    rq.delete(); reads_issued = 0;
    foreach (used_slots[i]) begin
      cq.push_back('{1'b0, cpu_word(used_slots[i] * 5 + 4, 0), 32'h0});
      cq.push_back('{1'b0, cpu_word(used_slots[i] * 5 + 4, 1), 32'h0});
      reads_issued += 2;
    end
    wait_idle(200000);
    bad_cnt = 0;
    checks++;
    if (rq.size() != reads_issued) begin
      failures++; $display("CPU reads returned %0d of %0d", rq.size(), reads_issued);
    end else begin
      foreach (used_slots[i]) begin
        if (rq[2*i] != 32'd64 || rq[2*i + 1][19:0] != 20'd1) bad_cnt++;
      end
    end
    checks += used_slots.size();
    failures += bad_cnt;
    if (bad_cnt != 0) $display("%0d entries with wrong counters", bad_cnt);

    $display("%0d flows: %0d in table 0, %0d in table 1, %0d collisions",
             nflows, nflows - t1 - coll, t1, coll);

    // remove the entries
    foreach (used_slots[i]) begin
      for (int k = 0; k < 5; k++) write64(used_slots[i] * 5 + k, 64'h0);
      occ[used_slots[i]] = 1'b0;
    end
    rq.delete(); reads_issued = 0;
    wait_idle(200000);
  endtask

  initial begin
    reads_issued = 0;
    foreach (occ[i]) occ[i] = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    run_round(500, 1);
    run_round(1500, 2);
    checks++;
    if (stat_undersize != 0 || stat_null_drop != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
