// tb_line_rate: forwarding-rate workload. Two ports each receive a flow at
// the full Gigabit Ethernet line rate (a packet of L bytes plus 20 bytes of
// preamble and inter-packet gap every (L + 20) * 8 ns), the two flows
// forwarded to each other's port, for packet sizes of 64, 65, 100 and 1518
// bytes. A model of the two RX MAC FIFOs merges the arrivals onto the
// datapath's receive stream packet by packet. Checks that every packet is
// forwarded unchanged to the right port, that neither RX FIFO ever holds
// more than four packets (the datapath keeps up), and that the forwarded
// rate, counted with the Ethernet CRC but without gap and preamble, is
// within 2 % of 2 x 1000 x L / (L + 20) Mb/s. Runs the design at its
// default size.
module tb_line_rate;
  import ethane_pkg::*;
  import tb_util_pkg::*;

  localparam int IDX_W = 12, AW = 19, RD_LAT = 2, NP = 4;
  logic clk = 0, rst_n = 0;
  always #8 clk = ~clk;   // 62.5 MHz, 16 ns

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
  typedef struct { logic [AW:0] addr; logic [31:0] data; } cop_t;
  cop_t cq[$];
  always @(posedge clk) begin
    if (!rst_n) cpu_req <= 1'b0;
    else if (!cpu_req || cpu_gnt) begin
      if (cq.size() != 0) begin
        cop_t o;
        o = cq.pop_front();
        cpu_req <= 1'b1; cpu_we <= 1'b1; cpu_addr <= o.addr; cpu_wdata <= o.data;
      end else cpu_req <= 1'b0;
    end
  end

  task automatic install(flow_tuple_t t, logic [2:0] dest);
    logic [319:0] s;
    int base;
    base = int'(hash_idx(t, CRC_POLY_A, IDX_W)) * 5;
    s = make_slot(t, 1'b1, dest, 48'h0, 48'h0, 20'd0, 32'd0);
    for (int k = 0; k < 5; k++) begin
      cq.push_back('{(AW+1)'({19'(base + k), 1'b0}), s[319 - 64*k - 32 -: 32]});
      cq.push_back('{(AW+1)'({19'(base + k), 1'b1}), s[319 - 64*k -: 32]});
    end
  endtask

  // ------------------------------------------------------------ RX MAC FIFO models
  pkt_word_t fifo [2][$];
  int        fifo_pkts [2];
  int        max_backlog = 0;
  int        cur = -1, last = 1;
  pkt_word_t exp_tx [NP][$];

  always @(posedge clk) begin
    if (!rst_n) rx_valid <= 1'b0;
    else begin
      if (rx_valid && rx_ready) begin
        if (rx_word.eop) begin fifo_pkts[cur]--; cur = -1; end
      end
      if (!rx_valid || rx_ready) begin
        if (cur < 0) begin
          // next packet: alternate between the two FIFOs
          if (fifo_pkts[1 - last] > 0) cur = 1 - last;
          else if (fifo_pkts[last] > 0) cur = last;
          if (cur >= 0) last = cur;
        end
        if (cur >= 0) begin
          rx_word <= fifo[cur].pop_front(); rx_valid <= 1'b1;
        end else rx_valid <= 1'b0;
      end
    end
  end

  // arrival of a whole packet into a port's RX FIFO
  task automatic arrive(frame_t f, int egress);
    bytes_t b;
    int nw;
    build_bytes(f, b);
    nw = nwords(f.len);
    for (int w = 0; w < nw; w++) begin
      pkt_word_t x, e;
      x.sop = (w == 0); x.eop = (w == nw - 1);
      x.data = word_of(b, w); x.len = 16'(f.len); x.port = f.port;
      fifo[f.port].push_back(x);
      e = x; e.port = 3'(egress);
      exp_tx[egress].push_back(e);
    end
    fifo_pkts[f.port]++;
    if (fifo_pkts[f.port] > max_backlog) max_backlog = fifo_pkts[f.port];
  endtask

  // ------------------------------------------------------------ TX sink
  longint tx_bytes = 0;
  realtime t_first_tx = 0, t_last_tx = 0;
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      int p;
      p = int'(tx_word.port);
      checks++;
      if (p >= NP || exp_tx[p].size() == 0 || tx_word != exp_tx[p][0]) begin
        failures++; $display("TX mismatch port %0d", p);
      end
      if (p < NP && exp_tx[p].size() != 0) void'(exp_tx[p].pop_front());
      if (tx_word.sop && tx_bytes == 0) t_first_tx = $realtime;
      if (tx_word.eop) begin tx_bytes += tx_word.len; t_last_tx = $realtime; end
    end
    if (rst_n && cpu_rx_valid) begin failures++; $display("unexpected packet to CPU"); end
  end

  frame_t fa, fb;
  int sizes[4] = '{64, 65, 100, 1518};
  int counts[4] = '{400, 400, 300, 40};

  initial begin
    fifo_pkts[0] = 0; fifo_pkts[1] = 0;
    fa = tcp_frame(48'h0000_0000_0b01, 48'h0000_0000_0a01, 32'h0a00_0001, 32'h0a00_0101,
                   16'd40000, 16'd5001, 64, 3'd0);
    fb = tcp_frame(48'h0000_0000_0a01, 48'h0000_0000_0b01, 32'h0a00_0101, 32'h0a00_0001,
                   16'd5001, 16'd40000, 64, 3'd1);
    repeat (4) @(posedge clk);
    rst_n = 1;
    install(exp_tuple(fa), 3'd1);
    install(exp_tuple(fb), 3'd0);
    while (cq.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);

    foreach (sizes[s]) begin
      real period_ns, t0, optimal, measured;
      real next_a, next_b;
      int sent_a, sent_b;
      fa.len = sizes[s]; fb.len = sizes[s];
      period_ns = real'(sizes[s] + 20) * 8.0;
      tx_bytes = 0;
      max_backlog = 0;
      t0 = $realtime;
      next_a = t0;
      next_b = t0 + period_ns / 2.0;   // the two ports out of phase
      sent_a = 0; sent_b = 0;
      while (sent_a < counts[s] || sent_b < counts[s]) begin
        @(posedge clk);
        if (sent_a < counts[s] && $realtime >= next_a) begin
          arrive(fa, 1); sent_a++; next_a += period_ns;
        end
        if (sent_b < counts[s] && $realtime >= next_b) begin
          arrive(fb, 0); sent_b++; next_b += period_ns;
        end
      end
      while (exp_tx[0].size() != 0 || exp_tx[1].size() != 0) @(posedge clk);
      optimal  = 2000.0 * real'(sizes[s]) / real'(sizes[s] + 20);
      // every packet after the first arrives period/2 later, so the window of
      // (2n - 1) packets spans (2n - 1) * period / 2 at the offered rate
      measured = real'(tx_bytes - sizes[s]) * 8.0 * 1000.0 / (t_last_tx - t_first_tx);
      $display("%0d-byte packets: forwarded %0.0f Mb/s, line rate %0.0f Mb/s, max RX FIFO backlog %0d packets",
               sizes[s], measured, optimal, max_backlog);
      checks += 3;
      if (tx_bytes != longint'(2 * counts[s] * sizes[s])) begin failures++; $display("bytes lost"); end
      if (measured < 0.98 * optimal) begin failures++; $display("below line rate"); end
      if (max_backlog > 4) begin failures++; $display("RX FIFO backlog grew"); end
      repeat (50) @(posedge clk);
    end
    checks++;
    if (stat_miss != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
