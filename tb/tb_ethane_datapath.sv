// tb_ethane_datapath: end-to-end test of the switch datapath at its default
// size (8,192-entry flow table, two 512K x 32 SRAM bank models, four ports).
//
// The CPU port installs flow entries word by word, then packets enter on the
// receive stream:
//   * a TCP flow hitting in hash table 0 and forwarded to port 1;
//   * a flow forwarded to port 0 with MAC DA and SA rewritten;
//   * a flow whose action sends it to the CPU;
//   * a flow to the null port (dropped);
//   * a flow found in hash table 1 because its table-0 slot holds another
//     flow (a hash collision);
//   * packets of an unknown flow (miss, to the CPU);
//   * undersize packets (dropped at the input);
//   * packets sent by the CPU to port 2.
// Every packet leaving on the TX stream or the CPU stream is compared with
// the frame expected for it. The CPU then reads the packet and byte counters
// back through the SRAM controller while a second burst of lookups runs.
// Finally a burst of 200 back-to-back 64-byte packets must be absorbed at one
// packet per 16 cycles or better. Each mechanism is counted and must occur.
module tb_ethane_datapath;
  import ethane_pkg::*;
  import tb_util_pkg::*;

  localparam int IDX_W = 12, AW = 19, RD_LAT = 2, NP = 4;
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

  // ------------------------------------------------------------ sources
  pkt_word_t rxq[$], ctxq[$];
  logic rx_gaps = 1'b1;
  always @(posedge clk) begin
    if (!rst_n) begin rx_valid <= 0; cpu_tx_valid <= 0; end
    else begin
      if (!rx_valid || rx_ready) begin
        if (rxq.size() != 0 && (!rx_gaps || $urandom % 4 != 0)) begin
          rx_word <= rxq.pop_front(); rx_valid <= 1'b1;
        end else rx_valid <= 1'b0;
      end
      if (!cpu_tx_valid || cpu_tx_ready) begin
        if (ctxq.size() != 0) begin cpu_tx_word <= ctxq.pop_front(); cpu_tx_valid <= 1'b1; end
        else cpu_tx_valid <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ CPU register port
  typedef struct { logic we; logic [AW:0] addr; logic [31:0] data; } cop_t;
  cop_t cq[$];
  logic [31:0] crd[$];
  always @(posedge clk) begin
    if (!rst_n) cpu_req <= 1'b0;
    else begin
      if (!cpu_req || cpu_gnt) begin
        if (cq.size() != 0) begin
          cop_t o;
          o = cq.pop_front();
          cpu_req <= 1'b1; cpu_we <= o.we; cpu_addr <= o.addr; cpu_wdata <= o.data;
        end else cpu_req <= 1'b0;
      end
      if (cpu_rvalid) crd.push_back(cpu_rdata);
    end
  end

  function automatic int slot_base(int table_, int idx);
    return (table_ * (1 << IDX_W) + idx) * 5;
  endfunction

  task automatic install(int table_, flow_tuple_t t, logic [2:0] dest,
                         logic [47:0] da, logic [47:0] sa);
    logic [319:0] s;
    int idx;
    idx = (table_ == 0) ? int'(hash_idx(t, CRC_POLY_A, IDX_W)) : int'(hash_idx(t, CRC_POLY_B, IDX_W));
    s = make_slot(t, 1'b1, dest, da, sa, 20'd0, 32'd0);
    for (int k = 0; k < 5; k++) begin
      cq.push_back('{1'b1, (AW+1)'({19'(slot_base(table_, idx) + k), 1'b0}), s[319 - 64*k - 32 -: 32]});
      cq.push_back('{1'b1, (AW+1)'({19'(slot_base(table_, idx) + k), 1'b1}), s[319 - 64*k -: 32]});
    end
  endtask

  // ------------------------------------------------------------ sinks
  pkt_word_t exp_tx [NP][$];
  pkt_word_t exp_cpu[$];
  int tx_pkts = 0, cpu_pkts = 0;
  always @(posedge clk) begin
    tx_ready     <= ($urandom % 8) != 0;
    cpu_rx_ready <= ($urandom % 8) != 0;
    if (rst_n && tx_valid && tx_ready) begin
      int p;
      p = int'(tx_word.port);
      checks++;
      if (p >= NP || exp_tx[p].size() == 0 || tx_word != exp_tx[p][0]) begin
        failures++; $display("TX mismatch port %0d data %h", p, tx_word.data);
      end
      if (p < NP && exp_tx[p].size() != 0) void'(exp_tx[p].pop_front());
      if (tx_word.eop) tx_pkts++;
    end
    if (rst_n && cpu_rx_valid && cpu_rx_ready) begin
      checks++;
      if (exp_cpu.size() == 0 || cpu_rx_word != exp_cpu[0]) begin
        failures++; $display("CPU mismatch data %h", cpu_rx_word.data);
      end
      if (exp_cpu.size() != 0) void'(exp_cpu.pop_front());
      if (cpu_rx_word.eop) cpu_pkts++;
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int ev_rx_stall = 0, ev_cpu_slot = 0, ev_tx_stall = 0, ev_hit_t1 = 0;
  int cpu_wait = 0, cpu_max_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && !rx_ready) ev_rx_stall++;
    if (tx_valid && !tx_ready) ev_tx_stall++;
    // CPU accesses granted while minimum-size packets stream in at full rate
    if (cpu_req && cpu_gnt && !rx_gaps && rxq.size() != 0) ev_cpu_slot++;
    if (cpu_req && !cpu_gnt) cpu_wait++;
    else cpu_wait = 0;
    if (cpu_wait > cpu_max_wait) cpu_max_wait = cpu_wait;
    // f5 lives only in hash table 1 and is the only flow sent to port 3
    if (tx_valid && tx_ready && tx_word.eop && tx_word.port == 3'd3) ev_hit_t1++;
  end

  // ------------------------------------------------------------ packets
  // egress: -1 dropped, 0..NP-1 port, NP CPU; da/sa: rewrite values (0 = none)
  task automatic send(frame_t f, int egress, logic [47:0] da, logic [47:0] sa);
    bytes_t b;
    int nw;
    build_bytes(f, b);
    nw = nwords(f.len);
    for (int w = 0; w < nw; w++) begin
      pkt_word_t x, e;
      x.sop = (w == 0); x.eop = (w == nw - 1);
      x.data = word_of(b, w); x.len = 16'(f.len); x.port = f.port;
      rxq.push_back(x);
      e = x;
      if (w == 0 && da != 0) e.data[63:16] = da;
      if (w == 0 && sa != 0) e.data[15:0]  = sa[47:32];
      if (w == 1 && sa != 0) e.data[63:32] = sa[31:0];
      if (egress >= 0 && egress < NP) begin e.port = 3'(egress); exp_tx[egress].push_back(e); end
      if (egress == NP) exp_cpu.push_back(e);
    end
  endtask

  task automatic wait_drain(int limit);
    int c;
    c = 0;
    while (c < limit && (rxq.size() != 0 || ctxq.size() != 0 || cq.size() != 0 ||
           exp_cpu.size() != 0 || exp_tx[0].size() != 0 || exp_tx[1].size() != 0 ||
           exp_tx[2].size() != 0 || exp_tx[3].size() != 0)) begin
      @(posedge clk); c++;
    end
    repeat (40) @(posedge clk);
  endtask

  frame_t f1, f2, f3, f4, f5, f6, fm, fu;
  flow_tuple_t t1, t5, t6;
  logic [47:0] rw_da = 48'h0200_0000_0042, rw_sa = 48'h0200_0000_0099;
  int n1 = 0, b1 = 0;

  initial begin
    int start, cycles, base, i1;
    logic [63:0] cw;
    f1 = tcp_frame(48'h0000_0000_0b01, 48'h0000_0000_0a01, 32'h0a00_0001, 32'h0a00_0101,
                   16'd40000, 16'd80, 64, 3'd0);
    f2 = tcp_frame(48'h0000_0000_0a01, 48'h0000_0000_0b01, 32'h0a00_0101, 32'h0a00_0001,
                   16'd80, 16'd40000, 120, 3'd1);
    f3 = tcp_frame(48'h0000_0000_0c01, 48'h0000_0000_0a02, 32'h0a00_0002, 32'h0a00_0201,
                   16'd5353, 16'd53, 90, 3'd2);
    f3.proto = 8'd17;
    f4 = tcp_frame(48'h0000_0000_0d01, 48'h0000_0000_0bad, 32'h0a00_0666, 32'h0a00_0001,
                   16'd6666, 16'd445, 64, 3'd3);
    f5 = tcp_frame(48'h0000_0000_0e01, 48'h0000_0000_0a03, 32'h0a00_0003, 32'h0a00_0301,
                   16'd1111, 16'd443, 200, 3'd0);
    f6 = tcp_frame(48'h0000_0000_0f01, 48'h0000_0000_0a04, 32'h0a00_0004, 32'h0a00_0401,
                   16'd2222, 16'd22, 64, 3'd1);   // occupies f5's table-0 slot
    fm = tcp_frame(48'h0000_0000_1101, 48'h0000_0000_1201, 32'h0a00_0009, 32'h0a00_0909,
                   16'd999, 16'd8080, 72, 3'd2);  // not installed: miss
    fu = fm; fu.len = 40;                         // undersize
    t1 = exp_tuple(f1);  t5 = exp_tuple(f5);  t6 = exp_tuple(f6);

    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- install the flow table through the CPU port
    install(0, t1, 3'd1, 48'h0, 48'h0);
    install(0, exp_tuple(f2), 3'd0, rw_da, rw_sa);
    install(0, exp_tuple(f3), DEST_CPU, 48'h0, 48'h0);
    install(0, exp_tuple(f4), DEST_NULL, 48'h0, 48'h0);
    // f6 sits in f5's table-0 slot, so f5 must go to table 1
    base = slot_base(0, int'(hash_idx(t5, CRC_POLY_A, IDX_W)));
    install(1, t5, 3'd3, 48'h0, 48'h0);
    begin
      logic [319:0] s;
      s = make_slot(t6, 1'b1, 3'd2, 48'h0, 48'h0, 20'd0, 32'd0);
      for (int k = 0; k < 5; k++) begin
        cq.push_back('{1'b1, (AW+1)'({19'(base + k), 1'b0}), s[319 - 64*k - 32 -: 32]});
        cq.push_back('{1'b1, (AW+1)'({19'(base + k), 1'b1}), s[319 - 64*k -: 32]});
      end
    end
    while (cq.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);

    // ---- mixed traffic
    for (int r = 0; r < 6; r++) begin
      f1.len = 64 + 50 * r;
      send(f1, 1, 0, 0); n1++; b1 += f1.len;
      send(f2, 0, rw_da, rw_sa);
      send(f3, NP, 0, 0);
      send(f4, -1, 0, 0);
      send(f5, 3, 0, 0);
      send(fm, NP, 0, 0);
      send(fu, -1, 0, 0);
      // the CPU sends a packet out of port 2
      for (int w = 0; w < 8; w++) begin
        pkt_word_t x;
        x.sop = (w == 0); x.eop = (w == 7);
        x.data = {32'hC0DE_0000 + 32'(r), 32'(w)}; x.len = 16'd64; x.port = 3'd2;
        ctxq.push_back(x);
        exp_tx[2].push_back(x);
      end
    end
    wait_drain(20000);

    // ---- CPU reads f1's counters while more f1 packets are looked up
    i1 = int'(hash_idx(t1, CRC_POLY_A, IDX_W));
    for (int r = 0; r < 20; r++) begin send(f1, 1, 0, 0); n1++; b1 += f1.len; end
    repeat (30) @(posedge clk);
    wait_drain(20000);
    crd.delete();
    cq.push_back('{1'b0, (AW+1)'({19'(slot_base(0, i1) + 4), 1'b0}), 32'h0});
    cq.push_back('{1'b0, (AW+1)'({19'(slot_base(0, i1) + 4), 1'b1}), 32'h0});
    while (crd.size() < 2) @(posedge clk);
    cw = {crd[1], crd[0]};
    checks += 2;
    if (cw[51:32] != 20'(n1)) begin failures++; $display("packet counter %0d exp %0d", cw[51:32], n1); end
    if (cw[31:0] != 32'(b1)) begin failures++; $display("byte counter %0d exp %0d", cw[31:0], b1); end

    // ---- line-rate burst: 200 back-to-back minimum-size packets of f1, with
    //      the CPU polling the counters at the same time
    rx_gaps = 1'b0;
    f1.len = 64;
    for (int r = 0; r < 200; r++) begin send(f1, 1, 0, 0); n1++; b1 += 64; end
    for (int r = 0; r < 40; r++)
      cq.push_back('{1'b0, (AW+1)'({19'(slot_base(0, i1) + 4), 1'b0}), 32'h0});
    start = int'($time / 16);
    while (rxq.size() != 0) @(posedge clk);
    cycles = int'($time / 16) - start;
    $display("200 x 64-byte packets accepted in %0d cycles (%0.2f cycles/packet)",
             cycles, real'(cycles) / 200.0);
    checks++;
    if (cycles > 200 * 16 + 40) begin failures++; $display("below one packet per 16 cycles"); end
    wait_drain(20000);

    // ---- final accounting
    checks += 8;
    if (exp_cpu.size() != 0) begin failures++; $display("%0d CPU words missing", exp_cpu.size()); end
    for (int p = 0; p < NP; p++)
      if (exp_tx[p].size() != 0) begin failures++; $display("%0d TX words missing on port %0d", exp_tx[p].size(), p); end
    if (stat_undersize != 32'd6) begin failures++; $display("undersize %0d", stat_undersize); end
    if (stat_null_drop != 32'd6) begin failures++; $display("null drops %0d", stat_null_drop); end
    if (stat_miss != 32'd6) begin failures++; $display("misses %0d", stat_miss); end
    $display("events: undersize=%0d hit=%0d miss=%0d fwd=%0d to_cpu=%0d null=%0d rewrite=%0d",
             stat_undersize, stat_hit, stat_miss, stat_fwd, stat_to_cpu, stat_null_drop, stat_rewrite);
    $display("events: table1_hit=%0d rx_stall=%0d tx_stall=%0d cpu_access_in_burst=%0d cpu_max_wait=%0d",
             ev_hit_t1, ev_rx_stall, ev_tx_stall, ev_cpu_slot, cpu_max_wait);
    checks += 9;
    if (stat_undersize == 0) begin failures++; $display("no undersize drop"); end
    if (stat_hit == 0) begin failures++; $display("no hit"); end
    if (stat_miss == 0) begin failures++; $display("no miss"); end
    if (stat_to_cpu == 0) begin failures++; $display("nothing to CPU"); end
    if (stat_null_drop == 0) begin failures++; $display("no null drop"); end
    if (stat_rewrite == 0) begin failures++; $display("no rewrite"); end
    if (ev_hit_t1 == 0) begin failures++; $display("no table-1 hit"); end
    if (ev_rx_stall == 0) begin failures++; $display("no RX back-pressure"); end
    if (ev_cpu_slot == 0) begin failures++; $display("no CPU access during the burst"); end
    checks++;
    if (cpu_max_wait > 15) begin failures++; $display("CPU waited %0d cycles", cpu_max_wait); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
