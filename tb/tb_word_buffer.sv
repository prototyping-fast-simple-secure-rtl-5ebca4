// tb_word_buffer: pushes 2,000 random words with random valid and ready
// patterns through a 16-word buffer and checks that they come out complete,
// in order and unchanged, that in_ready drops exactly when the buffer is
// full, that free counts the empty words, and that a word written in one
// cycle can be read in the next.
module tb_word_buffer;
  import ethane_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [$clog2(DEPTH):0] free;
  int checks = 0, failures = 0;

  word_buffer #(.DEPTH(DEPTH)) dut (.*);

  pkt_word_t model[$];
  int sent = 0, rcvd = 0, phase = 0, saw_full = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 0; out_ready <= 0;
    end else begin
      // checks on this cycle's values
      checks++;
      if (free != ($clog2(DEPTH)+1)'(DEPTH - model.size())) begin
        failures++; $display("free %0d model %0d", free, model.size());
      end
      checks++;
      if (in_ready != (model.size() < DEPTH)) begin failures++; $display("in_ready wrong"); end
      checks++;
      if (out_valid != (model.size() != 0)) begin failures++; $display("out_valid wrong"); end
      if (model.size() == DEPTH) saw_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_word != model[0]) begin failures++; $display("data mismatch"); end
        void'(model.pop_front());
        rcvd++;
      end
      if (in_valid && in_ready) begin
        model.push_back(in_word);
        sent++;
      end
      // next cycle's stimulus: phases of fast fill, fast drain and random
      phase = (sent / 250) % 3;
      if (!in_valid || in_ready) begin
        in_valid <= (sent < 2000) && (phase == 0 ? 1 : ($urandom % 2));
        in_word  <= pkt_word_t'({$urandom, $urandom, $urandom});
      end
      out_ready <= (phase == 1) ? 1'b1 : (phase == 0 ? ($urandom % 4 == 0) : $urandom % 2);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (rcvd < 2000) @(posedge clk);
    checks += 2;
    if (rcvd != sent) failures++;
    if (saw_full == 0) begin failures++; $display("never full"); end
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
