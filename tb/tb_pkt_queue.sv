// tb_pkt_queue: writes 200 packets of 1 to 20 words with random gaps into a
// 64-word queue and reads them with random back-pressure. Checks that the
// output only offers a packet once all of its words are in (store and
// forward), that words come out in order and unchanged, that pkt_count
// follows the number of complete packets held, and that in_ready drops when
// the queue is full.
module tb_pkt_queue;
  import ethane_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready, pkt_avail;
  logic [$clog2(DEPTH):0] pkt_count;
  int checks = 0, failures = 0;

  pkt_queue #(.DEPTH(DEPTH)) dut (.*);

  pkt_word_t txq[$], model[$];
  int complete = 0, rcvd_pkts = 0, saw_full = 0, in_pkt_out = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 0; out_ready <= 0;
    end else begin
      checks += 2;
      if (int'(pkt_count) != complete) begin
        failures++; $display("pkt_count %0d exp %0d", pkt_count, complete);
      end
      if (out_valid != (complete != 0)) begin failures++; $display("out_valid early/late"); end
      if (model.size() == DEPTH) begin
        saw_full++;
        checks++;
        if (in_ready) begin failures++; $display("in_ready while full"); end
      end
      if (out_valid && out_ready) begin
        checks++;
        if (model.size() == 0 || out_word != model[0]) begin
          failures++; $display("data mismatch");
        end
        if (out_word.eop) begin complete--; rcvd_pkts++; end
        void'(model.pop_front());
      end
      if (in_valid && in_ready) begin
        model.push_back(in_word);
        if (in_word.eop) complete++;
      end
      if (!in_valid || in_ready) begin
        if (txq.size() != 0 && ($urandom % 3 != 0)) begin
          in_word <= txq.pop_front(); in_valid <= 1'b1;
        end else in_valid <= 1'b0;
      end
      out_ready <= (rcvd_pkts > 100) ? ($urandom % 2) : ($urandom % 8 == 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int p = 0; p < 200; p++) begin
      int n;
      n = 1 + int'($urandom % 20);
      for (int w = 0; w < n; w++) begin
        pkt_word_t x;
        x = pkt_word_t'({$urandom, $urandom, $urandom});
        x.sop = (w == 0); x.eop = (w == n - 1);
        txq.push_back(x);
      end
    end
    rst_n = 1;
    while (rcvd_pkts < 200) @(posedge clk);
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
