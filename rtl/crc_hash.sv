// crc_hash: the two hash functions of the flow table (block C).
//
// The 155-bit flow tuple is padded with zeros to 160 bits (tuple in the top
// bits) and run through two different CRC-32 generators in parallel; the low
// IDX_W bits of each CRC index one of the two hash tables. Using two CRCs and
// two tables (double hashing) follows the switch description; the choice of
// CRC-32 (IEEE) and CRC-32C, the all-ones preset and taking the low bits are
// this design's own. Each CRC is a 160-step XOR network evaluated in one
// cycle.
//
// Interface: in_valid/tuple/len in; one cycle later out_valid with the
// lookup request {tuple, idx0, idx1, len}. No back-pressure: every input
// produces exactly one output.
module crc_hash
  import ethane_pkg::*;
#(
  parameter int unsigned IDX_W = 12   // 4,096 entries per hash table
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flow_tuple_t       tuple,
  input  logic [LEN_W-1:0]  len,
  output logic              out_valid,
  output lookup_req_t       req
);

  logic [TUPLE_PAD_W-1:0] padded;
  logic [31:0]            crc_a, crc_b;

  assign padded = {tuple, {(TUPLE_PAD_W - TUPLE_W){1'b0}}};
  assign crc_a  = crc32_160(padded, CRC_POLY_A);
  assign crc_b  = crc32_160(padded, CRC_POLY_B);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      req       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        req.tuple <= tuple;
        req.idx0  <= 16'(crc_a[IDX_W-1:0]);
        req.idx1  <= 16'(crc_b[IDX_W-1:0]);
        req.len   <= len;
      end
    end
  end

endmodule
