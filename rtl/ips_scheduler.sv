// ips_scheduler: Iterative Probabilistic Scheduling (IPS) for the virtual output
// queues of an N x N router.
//
// Every time slot the scheduler builds a conflict-free matching of inputs to
// outputs. It visits the output queues one per clock cycle, and only those that
// still have a request from an input not yet matched in this slot and whose
// output queue has room. For the visited output j it:
//   1. retrieves the weight WP_{i,j} of every contending input i and sums them,
//   2. picks the input with the highest transmission probability
//      P_{i,j} = WP_{i,j} / sum -- since the sum is common to all contenders this
//      is the input with the highest weight (lowest index on a tie),
//   3. tags that packet as the slot's highest-bandwidth packet (HBWP) for output
//      j, records P (Q1.8, from ips_prob) and marks the input as matched.
// When no output is left to visit, slot_end is high for one cycle: the matching
// is final on out_match_* / in_grant_*, the input ports pop the granted packets
// and the fabric moves them to the output queues at that clock edge. The matching
// is then cleared, the slot counter `now` advances and the next slot begins on the
// following cycle. A slot therefore takes one cycle per grant plus the transfer
// cycle (at most N+1 cycles), i.e. O(N) time.
//
// The visit order starts at a pointer that moves on by one output each slot, so
// no output always chooses first; that pointer, the tie rule, skipping full
// output queues and the cycle-level timing are this design's own choices. The
// weight, the probability, the HBWP tag and one grant per input and per output
// follow the scheme.
//
// Inputs req and wp must not change during a slot except by new packets
// arriving, which is the case when they come from voq_input_port.
module ips_scheduler
  import mqas_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned TIME_W = 32,
  localparam int unsigned WP_W  = wp_width(TIME_W),
  localparam int unsigned SUM_W = WP_W + idx_width(N),
  localparam int unsigned IW    = idx_width(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      req [N],       // req[i][j]: input i has a packet for output j
  input  logic [WP_W-1:0]   wp  [N][N],    // wp[i][j]: weight of that packet
  input  logic [N-1:0]      oq_full,       // output queue j cannot take a packet
  output logic              slot_end,      // transfer cycle of the slot
  output logic [TIME_W-1:0] now,           // time-slot counter
  output logic [N-1:0]      out_match_valid,
  output logic [PORT_W-1:0] out_match_in [N],
  output logic [PROB_W-1:0] out_prob [N],
  output logic [N-1:0]      in_grant_valid,
  output logic [PORT_W-1:0] in_grant_out [N]
);

  logic [N-1:0]      visited;
  logic [IW-1:0]     rr;

  // Combinational view of the current iteration.
  logic [N-1:0]      cand [N];   // cand[j][i]: input i contends for output j
  logic [N-1:0]      active;
  logic              any_active;
  logic [IW-1:0]     sel_out;
  logic [IW-1:0]     best_in;
  logic [WP_W-1:0]   best_wp;
  logic [SUM_W-1:0]  wp_sum;
  logic [PROB_W-1:0] best_prob;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) cand[j][i] = req[i][j] && !in_grant_valid[i];
      active[j] = !visited[j] && !oq_full[j] && (|cand[j]);
    end
  end

  // Next output to visit: first active one at or after the rotating pointer.
  always_comb begin
    logic [IW-1:0] k;
    any_active = 1'b0;
    sel_out    = '0;
    for (int unsigned d = 0; d < N; d++) begin
      k = IW'((int'(rr) + d) % N);
      if (!any_active && active[k]) begin
        any_active = 1'b1;
        sel_out    = k;
      end
    end
  end

  // Retrieve the contenders of the selected output: weight sum and maximum.
  always_comb begin
    logic found;
    found   = 1'b0;
    best_in = '0;
    best_wp = '0;
    wp_sum  = '0;
    for (int i = 0; i < N; i++) begin
      if (cand[sel_out][i]) begin
        wp_sum = wp_sum + SUM_W'(wp[i][sel_out]);
        if (!found || wp[i][sel_out] > best_wp) begin
          found   = 1'b1;
          best_wp = wp[i][sel_out];
          best_in = IW'(i);
        end
      end
    end
  end

  ips_prob #(.WP_W(WP_W), .SUM_W(SUM_W)) u_prob (
    .wp(best_wp), .sum(wp_sum), .prob(best_prob)
  );

  assign slot_end = !any_active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      visited         <= '0;
      rr              <= '0;
      now             <= '0;
      out_match_valid <= '0;
      in_grant_valid  <= '0;
      for (int j = 0; j < N; j++) begin
        out_match_in[j] <= '0;
        out_prob[j]     <= '0;
        in_grant_out[j] <= '0;
      end
    end else if (any_active) begin
      visited[sel_out]         <= 1'b1;
      out_match_valid[sel_out] <= 1'b1;
      out_match_in[sel_out]    <= PORT_W'(best_in);
      out_prob[sel_out]        <= best_prob;
      in_grant_valid[best_in]  <= 1'b1;
      in_grant_out[best_in]    <= PORT_W'(sel_out);
    end else begin
      visited         <= '0;
      out_match_valid <= '0;
      in_grant_valid  <= '0;
      now             <= now + 1'b1;
      rr              <= (int'(rr) == int'(N) - 1) ? '0 : rr + 1'b1;
    end
  end

  // The matching is a matching: every granted input was requested by its output.
  for (genvar j = 0; j < N; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     out_match_valid[j] |-> (in_grant_valid[IW'(out_match_in[j])] &&
                                             int'(in_grant_out[IW'(out_match_in[j])]) == j))
      else $error("ips_scheduler: output %0d and its input disagree", j);
  end

endmodule
