// flow_lookup: flow entry lookup and update (block D).
//
// For each packet's lookup request {tuple, idx0, idx1, len} the block reads
// the 320-bit slot at idx0 of hash table 0 and then the slot at idx1 of hash
// table 1 from SRAM (both tables share one memory, so the two reads are
// sequential, as in the switch description). A slot hits when its valid bit
// is set and its stored 155-bit tuple equals the packet's tuple; table 0 is
// preferred if both hit. On a hit the 20-bit packet counter is incremented,
// the packet length is added to the 32-bit byte counter (both wrap), and the
// counter word is written back. The result {hit, dest, overwrite MAC DA/SA}
// goes to the header overwrite/enqueue block; a miss sends the packet to the
// CPU.
//
// Memory map (this design's own): slot s = table * TABLE_ENTRIES + idx
// occupies the five 64-bit SRAM words s*5 .. s*5+4; word k holds slot bits
// [319-64k -: 64] (see ethane_pkg::flow_slot_t), so the counters are word 4.
// 2 * 4,096 slots * 40 bytes = 320 KB.
//
// Timing: one request at a time. 1 cycle to accept, 10 read issues, RD_LAT
// cycles for the last read to return, 1 cycle to compare and write the
// counters: 12 + RD_LAT cycles per packet, plus at most one cycle lost to a
// CPU access per 16-cycle frame, so 15 cycles with RD_LAT = 2, within the
// 16-cycle packet budget of the design.
module flow_lookup
  import ethane_pkg::*;
#(
  parameter int unsigned IDX_W = 12,   // 4,096 slots per hash table
  parameter int unsigned AW    = 19    // SRAM word address width
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup requests
  input  logic            req_valid,
  input  lookup_req_t     req,
  output logic            req_ready,
  // lookup results
  output logic            res_valid,
  output lookup_result_t  res,
  input  logic            res_ready,
  // SRAM controller
  output logic            m_req,
  output logic            m_we,
  output logic [AW-1:0]   m_addr,
  output logic [63:0]     m_wdata,
  input  logic            m_gnt,
  input  logic            m_rvalid,
  input  logic [63:0]     m_rdata,
  // statistics
  output logic [31:0]     hit_count,
  output logic [31:0]     miss_count
);

  localparam int unsigned TABLE_ENTRIES = 1 << IDX_W;
  localparam int unsigned NREADS        = 2 * SLOT_DW;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DONE} state_t;
  state_t state_q;

  lookup_req_t  cur_q;
  logic [3:0]   issue_q, ret_q;
  logic [SLOT_W-1:0] slot_q [2];

  // SRAM word address of word k of the slot selected by table t.
  function automatic logic [AW-1:0] word_addr(input logic t, input logic [15:0] idx,
                                               input int unsigned k);
    int unsigned s;
    s = (t ? TABLE_ENTRIES : 0) + int'(idx[IDX_W-1:0]);
    return AW'(s * SLOT_DW + k);
  endfunction

  flow_slot_t s0, s1, hs;
  logic       hit0, hit1, hit;
  assign s0   = flow_slot_t'(slot_q[0]);
  assign s1   = flow_slot_t'(slot_q[1]);
  assign hit0 = s0.valid && (s0.tuple == cur_q.tuple);
  assign hit1 = s1.valid && (s1.tuple == cur_q.tuple);
  assign hit  = hit0 || hit1;
  assign hs   = hit0 ? s0 : s1;

  always_comb begin
    m_req   = 1'b0;
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    if (state_q == S_READ && issue_q < 4'(NREADS)) begin
      m_req  = 1'b1;
      m_addr = (issue_q < 4'(SLOT_DW))
             ? word_addr(1'b0, cur_q.idx0, int'(issue_q))
             : word_addr(1'b1, cur_q.idx1, int'(issue_q) - SLOT_DW);
    end else if (state_q == S_DONE && hit && res_ready) begin
      m_req   = 1'b1;
      m_we    = 1'b1;
      m_addr  = word_addr(!hit0, hit0 ? cur_q.idx0 : cur_q.idx1, SLOT_DW - 1);
      m_wdata = {hs.pad[63 - PKT_CNT_W - BYTE_CNT_W:0],
                 hs.pkt_cnt + PKT_CNT_W'(1),
                 hs.byte_cnt + BYTE_CNT_W'(cur_q.len)};
    end
  end

  assign req_ready     = (state_q == S_IDLE);
  assign res_valid     = (state_q == S_DONE) && res_ready && (!hit || m_gnt);
  assign res.hit       = hit;
  assign res.dest      = hit ? hs.dest : DEST_CPU;
  assign res.ow_mac_da = hit ? hs.ow_mac_da : '0;
  assign res.ow_mac_sa = hit ? hs.ow_mac_sa : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      cur_q      <= '0;
      issue_q    <= '0;
      ret_q      <= '0;
      hit_count  <= '0;
      miss_count <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (req_valid) begin
          cur_q   <= req;
          issue_q <= '0;
          ret_q   <= '0;
          state_q <= S_READ;
        end
        S_READ: begin
          if (m_req && m_gnt) issue_q <= issue_q + 1'b1;
          if (m_rvalid) begin
            ret_q <= ret_q + 1'b1;
            if (ret_q == 4'(NREADS - 1)) state_q <= S_DONE;
          end
        end
        S_DONE: if (res_valid) begin
          state_q <= S_IDLE;
          if (hit) hit_count  <= hit_count + 32'd1;
          else     miss_count <= miss_count + 32'd1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Returned words land in the slot buffers in issue order.
  always_ff @(posedge clk) begin
    if (state_q == S_READ && m_rvalid) begin
      if (ret_q < 4'(SLOT_DW))
        slot_q[0][SLOT_W - 1 - 64 * int'(ret_q) -: 64] <= m_rdata;
      else
        slot_q[1][SLOT_W - 1 - 64 * (int'(ret_q) - SLOT_DW) -: 64] <= m_rdata;
    end
  end

  a_res_ready: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> res_ready);

endmodule
