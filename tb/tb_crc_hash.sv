// tb_crc_hash: drives random and hand-picked flow tuples and compares both
// hash indices with CRCs computed by polynomial long division, one cycle
// after each input; checks that the tuple and length are passed along.
module tb_crc_hash;
  import ethane_pkg::*;
  import tb_util_pkg::*;

  localparam int IDX_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid, out_valid;
  flow_tuple_t      tuple;
  logic [LEN_W-1:0] len;
  lookup_req_t      req;
  int checks = 0, failures = 0;

  crc_hash #(.IDX_W(IDX_W)) dut (.*);

  flow_tuple_t prev_t;
  logic [LEN_W-1:0] prev_len;
  logic prev_v = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != prev_v) begin failures++; $display("valid timing"); end
      if (prev_v && out_valid) begin
        checks += 3;
        if (req.idx0 != 16'(hash_idx(prev_t, CRC_POLY_A, IDX_W))) begin
          failures++; $display("idx0 %h", req.idx0);
        end
        if (req.idx1 != 16'(hash_idx(prev_t, CRC_POLY_B, IDX_W))) begin
          failures++; $display("idx1 %h", req.idx1);
        end
        if (req.tuple != prev_t || req.len != prev_len) begin
          failures++; $display("tuple/len not passed");
        end
      end
    end
    prev_v   <= in_valid;
    prev_t   <= tuple;
    prev_len <= len;
  end

  initial begin
    int distinct;
    logic [IDX_W-1:0] seen0[$];
    in_valid = 0; tuple = '0; len = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      if (i == 0) tuple = '0;
      else if (i == 1) tuple = '1;
      else tuple = {$urandom, $urandom, $urandom, $urandom, $urandom};
      len = 16'($urandom % 1519);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    // the two functions must differ
    checks++;
    if (hash_idx('1, CRC_POLY_A, IDX_W) == hash_idx('1, CRC_POLY_B, IDX_W)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
