// tb_undersize_checker: sends packets of 40, 63, 64, 65, 100 and 8 bytes,
// with random back-pressure, and checks that exactly the packets of 64 bytes
// or more come out, word for word, and that the drop counter counts the rest.
module tb_undersize_checker;
  import ethane_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] drop_count;
  int checks = 0, failures = 0;

  undersize_checker dut (.*);

  int lens[6] = '{40, 63, 64, 65, 100, 8};
  pkt_word_t expq[$];

  // receiver with random ready
  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_word != expq[0]) begin
        failures++;
        $display("mismatch: got %h", out_word);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  // word source: pops a queue, holds a word until it is taken
  pkt_word_t txq[$];
  always @(posedge clk) begin
    if (!rst_n) in_valid <= 1'b0;
    else if (!in_valid || in_ready) begin
      if (txq.size() != 0) begin
        in_word  <= txq.pop_front();
        in_valid <= 1'b1;
      end else in_valid <= 1'b0;
    end
  end

  task automatic send(int len, int id);
    int nw = (len + 7) / 8;
    for (int w = 0; w < nw; w++) begin
      pkt_word_t x;
      x.sop = (w == 0); x.eop = (w == nw - 1);
      x.data = {id[31:0], w[31:0]}; x.len = 16'(len); x.port = 3'(id);
      if (len >= 64) expq.push_back(x);
      txq.push_back(x);
    end
  endtask

  initial begin
    in_valid = 0; in_word = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int r = 0; r < 3; r++)
      foreach (lens[i]) send(lens[i], r * 10 + i);
    while (txq.size() != 0) @(posedge clk);
    repeat (30) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    checks++;
    if (drop_count != 32'd9) begin failures++; $display("drop_count %0d", drop_count); end
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
