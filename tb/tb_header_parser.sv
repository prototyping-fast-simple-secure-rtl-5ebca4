// tb_header_parser: feeds Ethernet frames (TCP, UDP with IP options, ICMP,
// ARP, maximum IP header length, ports cut off by the frame end, random TCP
// frames) with random idle cycles between words, and compares each emitted
// flow tuple and length with the tuple built directly from the frame's
// fields. Also checks that a tuple appears at most 10 words plus one cycle
// after the packet's first word.
module tb_header_parser;
  import ethane_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_word_t   in_word;
  logic        in_fire;
  logic        tuple_valid;
  flow_tuple_t tuple;
  logic [LEN_W-1:0] len;
  int checks = 0, failures = 0;

  header_parser dut (.*);

  pkt_word_t   txq[$];
  flow_tuple_t expq[$];
  int          explen[$];
  int          sop_time[$];
  int          cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n || txq.size() == 0 || ($urandom % 3) == 0) begin
      in_fire <= 1'b0;
    end else begin
      in_word <= txq[0];
      if (txq[0].sop) sop_time.push_back(cyc + 1);
      void'(txq.pop_front());
      in_fire <= 1'b1;
    end
    if (rst_n && tuple_valid) begin
      checks += 3;
      if (expq.size() == 0) begin failures++; $display("unexpected tuple"); end
      else begin
        if (tuple != expq[0]) begin
          failures++; $display("tuple mismatch got %h exp %h", tuple, expq[0]);
        end
        if (int'(len) != explen[0]) begin failures++; $display("len mismatch"); end
        // 10 header words with at most 2 idle cycles each is the worst case here
        if (cyc - sop_time[0] > 40) begin failures++; $display("late tuple"); end
        void'(expq.pop_front()); void'(explen.pop_front()); void'(sop_time.pop_front());
      end
    end
  end

  task automatic queue_frame(frame_t f);
    bytes_t b;
    int nw;
    build_bytes(f, b);
    nw = nwords(f.len);
    for (int w = 0; w < nw; w++) begin
      pkt_word_t x;
      x.sop = (w == 0); x.eop = (w == nw - 1);
      x.data = word_of(b, w); x.len = 16'(f.len); x.port = f.port;
      txq.push_back(x);
    end
    expq.push_back(exp_tuple(f));
    explen.push_back(f.len);
  endtask

  initial begin
    frame_t f;
    in_fire = 0; in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    f = tcp_frame(48'h0011_2233_4455, 48'h6677_8899_aabb, 32'h0a00_0001, 32'h0a00_0002,
                  16'd1234, 16'd80, 64, 3'd1);
    queue_frame(f);
    f.proto = 8'd17; f.ihl = 4'd7; f.len = 100; f.port = 3'd2; f.sport = 16'd53;
    queue_frame(f);
    f.proto = 8'd1; f.ihl = 4'd5; f.len = 64;
    queue_frame(f);
    f.ethertype = 16'h0806;
    queue_frame(f);
    f = tcp_frame(48'h0a0b_0c0d_0e0f, 48'h1112_1314_1516, 32'hc0a8_0101, 32'hc0a8_0102,
                  16'd5000, 16'd22, 80, 3'd3);
    f.ihl = 4'd15;
    queue_frame(f);
    f.len = 76;
    queue_frame(f);
    for (int i = 0; i < 30; i++) begin
      f = tcp_frame({$urandom, $urandom}, {$urandom, $urandom}, $urandom, $urandom,
                    16'($urandom), 16'($urandom), 64 + int'($urandom % 1455), 3'($urandom % 4));
      if (i % 2 == 1) f.proto = 8'd17;
      queue_frame(f);
    end
    while (txq.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d tuples missing", expq.size()); end
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
