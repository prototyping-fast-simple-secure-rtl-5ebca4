// tb_hdr_overwrite_enq: 120 packets of 8 to 24 words with random lookup
// results: hits to each of four ports with and without MAC DA/SA overwrite,
// hits to the CPU, misses, hits to the null port and to a port the switch
// lacks. Every queue's output is compared with a reference built here: the
// rewritten words (MAC DA = bytes 0-5, MAC SA = bytes 6-11), the egress port
// tag on port queues and the untouched ingress port on the CPU queue.
// Dropped packets must vanish. The four counters are checked at the end.
module tb_hdr_overwrite_enq;
  import ethane_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_word_t      in_word, out_word;
  logic           in_valid, in_ready, res_valid, res_pop;
  lookup_result_t res;
  logic [NP:0]    out_valid, out_ready;
  logic [31:0]    fwd_count, cpu_count, drop_count, rewrite_count;
  int checks = 0, failures = 0;

  hdr_overwrite_enq #(.NUM_PORTS(NP)) dut (.*);

  pkt_word_t      wq[$];
  lookup_result_t rq[$];
  pkt_word_t      exp_q [NP+1][$];
  int n_fwd = 0, n_cpu = 0, n_drop = 0, n_rw = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(wq.pop_front());
    if (rst_n && res_valid && res_pop) void'(rq.pop_front());
    in_valid  <= rst_n && wq.size() != 0 && ($urandom % 5 != 0);
    if (wq.size() != 0) in_word <= wq[0];
    res_valid <= rst_n && rq.size() != 0;
    if (rq.size() != 0) res <= rq[0];
    for (int q = 0; q <= NP; q++) out_ready[q] <= ($urandom % 3) != 0;
    for (int q = 0; q <= NP; q++)
      if (rst_n && out_valid[q] && out_ready[q]) begin
        checks++;
        if (exp_q[q].size() == 0 || out_word != exp_q[q][0]) begin
          failures++; $display("queue %0d mismatch %h", q, out_word.data);
        end
        if (exp_q[q].size() != 0) void'(exp_q[q].pop_front());
      end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int p = 0; p < 120; p++) begin
      int n, q, kind;
      lookup_result_t r;
      logic [47:0] da, sa;
      n = 8 + int'($urandom % 17);
      kind = int'($urandom % 6);
      r = '0;
      r.hit = (kind != 2);
      case (kind)
        0, 1: r.dest = 3'($urandom % NP);
        2:    r.dest = DEST_CPU;
        3:    r.dest = DEST_CPU;
        4:    r.dest = DEST_NULL;
        default: r.dest = 3'd5;
      endcase
      if (r.hit && ($urandom % 2)) r.ow_mac_da = {$urandom, $urandom};
      if (r.hit && ($urandom % 2)) r.ow_mac_sa = {$urandom, $urandom};
      rq.push_back(r);
      q = (!r.hit || r.dest == DEST_CPU) ? NP : (int'(r.dest) < NP ? int'(r.dest) : -1);
      if (q < 0) n_drop++;
      else if (q == NP) n_cpu++;
      else n_fwd++;
      if (q >= 0 && r.hit && (r.ow_mac_da != 0 || r.ow_mac_sa != 0)) n_rw++;
      for (int w = 0; w < n; w++) begin
        pkt_word_t x, e;
        x.sop = (w == 0); x.eop = (w == n - 1);
        x.data = {$urandom, $urandom}; x.len = 16'(8 * n); x.port = 3'($urandom % NP);
        wq.push_back(x);
        e = x;
        if (q >= 0 && q < NP) e.port = r.dest;
        // rewritten header bytes, byte by byte
        da = (r.ow_mac_da != 0) ? r.ow_mac_da : 48'h0;
        sa = (r.ow_mac_sa != 0) ? r.ow_mac_sa : 48'h0;
        for (int b = 0; b < 8; b++) begin
          int byte_no;
          byte_no = 8 * w + b;
          if (byte_no < 6 && da != 0) e.data[63 - 8*b -: 8] = da[47 - 8*byte_no -: 8];
          if (byte_no >= 6 && byte_no < 12 && sa != 0)
            e.data[63 - 8*b -: 8] = sa[47 - 8*(byte_no - 6) -: 8];
        end
        if (q >= 0) exp_q[q].push_back(e);
      end
    end
    rst_n = 1;
    while (wq.size() != 0 || rq.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int q = 0; q <= NP; q++) begin
      checks++;
      if (exp_q[q].size() != 0) begin failures++; $display("queue %0d short", q); end
    end
    checks += 4;
    if (fwd_count != 32'(n_fwd)) begin failures++; $display("fwd %0d", fwd_count); end
    if (cpu_count != 32'(n_cpu)) begin failures++; $display("cpu %0d", cpu_count); end
    if (drop_count != 32'(n_drop)) begin failures++; $display("drop %0d", drop_count); end
    if (rewrite_count != 32'(n_rw)) begin failures++; $display("rewrite %0d", rewrite_count); end
    $display("fwd=%0d cpu=%0d drop=%0d rewrite=%0d", n_fwd, n_cpu, n_drop, n_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
