// hdr_overwrite_enq: packet header overwrite and enqueue (block G).
//
// Pairs each buffered packet with its lookup result (both arrive in packet
// order) and carries out the action:
//   * hit, destination a physical port below NUM_PORTS: the packet goes to
//     that port's output queue, tagged with the egress port;
//   * hit, destination the CPU, or a miss: the packet goes to the CPU queue,
//     tagged with its ingress port;
//   * hit, destination the null port (or a port this switch lacks): the
//     packet is read out of the buffer and dropped.
// On the way the MAC destination and source addresses are overwritten with
// the entry's values; an all-zero overwrite field leaves the address as it
// is. The three outcomes and the overwrite follow the switch description;
// the zero-means-keep rule and the port encoding (ethane_pkg) are this
// design's own.
//
// Frame bytes 0-5 (MAC DA) sit in word 0 bits 63:16, bytes 6-11 (MAC SA) in
// word 0 bits 15:0 and word 1 bits 63:32.
//
// Timing: one cycle to take the result and choose the queue, then one word
// per cycle while the chosen queue accepts. out_valid[i]/out_ready[i] are the
// handshakes of the NUM_PORTS port queues, index NUM_PORTS is the CPU queue;
// out_word is shared.
module hdr_overwrite_enq
  import ethane_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // buffered packet words
  input  pkt_word_t            in_word,
  input  logic                 in_valid,
  output logic                 in_ready,
  // lookup results (show-ahead)
  input  logic                 res_valid,
  input  lookup_result_t       res,
  output logic                 res_pop,
  // queues: 0..NUM_PORTS-1 ports, NUM_PORTS the CPU
  output pkt_word_t            out_word,
  output logic [NUM_PORTS:0]   out_valid,
  input  logic [NUM_PORTS:0]   out_ready,
  // statistics
  output logic [31:0]          fwd_count,
  output logic [31:0]          cpu_count,
  output logic [31:0]          drop_count,
  output logic [31:0]          rewrite_count
);

  localparam int unsigned QW = $clog2(NUM_PORTS + 1);

  typedef enum logic [1:0] {S_IDLE, S_XFER, S_DROP} state_t;
  state_t         state_q;
  lookup_result_t act_q;
  logic [QW-1:0]  q_q;        // chosen queue
  logic [1:0]     widx_q;     // word index within the packet, saturating at 2

  // Choice of queue for the result at the head.
  logic [QW-1:0] q_sel;
  logic          to_drop, to_cpu;
  always_comb begin
    to_cpu  = !res.hit || res.dest == DEST_CPU;
    to_drop = res.hit && !to_cpu && (int'(res.dest) >= NUM_PORTS);
    q_sel   = to_cpu ? QW'(NUM_PORTS) : QW'(res.dest);
  end

  // Rewritten word.
  always_comb begin
    out_word = in_word;
    if (state_q == S_XFER && q_q != QW'(NUM_PORTS)) out_word.port = act_q.dest;
    if (state_q == S_XFER && act_q.hit) begin
      if (widx_q == 2'd0) begin
        if (act_q.ow_mac_da != '0) out_word.data[63:16] = act_q.ow_mac_da;
        if (act_q.ow_mac_sa != '0) out_word.data[15:0]  = act_q.ow_mac_sa[47:32];
      end else if (widx_q == 2'd1) begin
        if (act_q.ow_mac_sa != '0) out_word.data[63:32] = act_q.ow_mac_sa[31:0];
      end
    end
  end

  always_comb begin
    out_valid = '0;
    in_ready  = 1'b0;
    if (state_q == S_XFER) begin
      out_valid[q_q] = in_valid;
      in_ready       = out_ready[q_q];
    end else if (state_q == S_DROP) begin
      in_ready = 1'b1;
    end
  end

  assign res_pop = (state_q == S_IDLE) && res_valid && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      act_q         <= '0;
      q_q           <= '0;
      widx_q        <= '0;
      fwd_count     <= '0;
      cpu_count     <= '0;
      drop_count    <= '0;
      rewrite_count <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (res_pop) begin
          act_q  <= res;
          q_q    <= q_sel;
          widx_q <= '0;
          if (to_drop) begin
            state_q    <= S_DROP;
            drop_count <= drop_count + 32'd1;
          end else begin
            state_q <= S_XFER;
            if (to_cpu) cpu_count <= cpu_count + 32'd1;
            else        fwd_count <= fwd_count + 32'd1;
            if (res.hit && (res.ow_mac_da != '0 || res.ow_mac_sa != '0))
              rewrite_count <= rewrite_count + 32'd1;
          end
        end
        S_XFER, S_DROP: if (in_valid && in_ready) begin
          if (widx_q != 2'd2) widx_q <= widx_q + 1'b1;
          if (in_word.eop) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_sop_first: assert property (@(posedge clk) disable iff (!rst_n)
    res_pop |-> in_word.sop);

endmodule
