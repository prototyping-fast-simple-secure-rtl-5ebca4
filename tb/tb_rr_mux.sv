// tb_rr_mux: five inputs, each holding whole packets of 1 to 12 words.
// Checks that every packet comes out whole, in order per input and with its
// words unchanged; that while all inputs are backlogged they are served in
// strict rotation; that with only inputs 1 and 3 loaded the two alternate;
// and that out_valid/out_ready back-pressure loses nothing.
module tb_rr_mux;
  import ethane_pkg::*;
  localparam int NIN = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_word_t      in_word [NIN];
  logic [NIN-1:0] in_valid, in_ready;
  pkt_word_t      out_word;
  logic           out_valid, out_ready;
  int checks = 0, failures = 0;

  rr_mux #(.NIN(NIN)) dut (.*);

  pkt_word_t src [NIN][$];
  pkt_word_t exp_q [NIN][$];
  int served[$];
  int cur = -1, total_pkts = 0, rcvd_pkts = 0;

  // sources: show the head of each queue, pop on a handshake
  always @(posedge clk) begin
    for (int i = 0; i < NIN; i++) begin
      if (rst_n && in_valid[i] && in_ready[i]) void'(src[i].pop_front());
      in_valid[i] <= rst_n && src[i].size() != 0;
      if (src[i].size() != 0) in_word[i] <= src[i][0];
    end
  end

  // sink
  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (rst_n && out_valid && out_ready) begin
      int i;
      i = int'(out_word.data[63:56]);
      checks++;
      if (i >= NIN || exp_q[i].size() == 0 || out_word != exp_q[i][0]) begin
        failures++; $display("word mismatch %h", out_word.data);
      end else void'(exp_q[i].pop_front());
      if (out_word.sop) begin
        checks++;
        if (cur != -1) begin failures++; $display("packet interleaved"); end
        cur = i;
        served.push_back(i);
      end else begin
        checks++;
        if (cur != i) begin failures++; $display("word from wrong input"); end
      end
      if (out_word.eop) begin cur = -1; rcvd_pkts++; end
    end
  end

  task automatic add_pkts(int i, int n);
    for (int p = 0; p < n; p++) begin
      int len;
      len = 1 + int'($urandom % 12);
      for (int w = 0; w < len; w++) begin
        pkt_word_t x;
        x = '0;
        x.sop = (w == 0); x.eop = (w == len - 1);
        x.data = {8'(i), 24'(total_pkts), 32'(w)};
        x.port = 3'(i);
        src[i].push_back(x);
        exp_q[i].push_back(x);
      end
      total_pkts++;
    end
  endtask

  initial begin
    for (int i = 0; i < NIN; i++) add_pkts(i, 10);
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (rcvd_pkts < 50) @(posedge clk);
    // strict rotation while all inputs were backlogged (first 45 packets)
    for (int k = 1; k < 45; k++) begin
      checks++;
      if (served[k] != (served[k-1] + 1) % NIN) begin
        failures++; $display("rotation broken at %0d: %0d after %0d", k, served[k], served[k-1]);
      end
    end
    served.delete();
    add_pkts(1, 6);
    add_pkts(3, 6);
    while (rcvd_pkts < 62) @(posedge clk);
    for (int k = 1; k < 12; k++) begin
      checks++;
      if (served[k] == served[k-1] || (served[k] != 1 && served[k] != 3)) begin
        failures++; $display("1/3 not alternating");
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid) failures++;
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
