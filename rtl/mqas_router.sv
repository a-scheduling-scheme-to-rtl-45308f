// mqas_router: an N x N router built on multistage queuing and scheduling (MQAS).
//
// Stage one queues packets at the inputs, in one virtual output queue (VOQ) per
// output port at every input (N*N queues in all), so that no packet waits behind
// one for a different output. Iterative Probabilistic Scheduling (IPS) decides,
// each time slot, which VOQ head packets cross the switching fabric: for every
// output it favours the contender with the largest weight 2*size + wait, so large
// packets go first but a packet that has waited long enough always wins in the
// end. Stage two is a plain FIFO queue per output that feeds the output link.
//
//   in_valid/in_pkt --> voq_input_port x N --req/wp--> ips_scheduler
//                              |  <--grant------------------|
//                              v                             | match
//                           crossbar  ------------------> output_queue x N --> out_valid/out_pkt
//
// Timing: a time slot lasts one clock per matched pair plus one transfer clock
// (slot_end high). At the transfer clock every matched pair moves one packet,
// tagged HBWP with the probability it won with, from its VOQ into the output
// queue; slot_now then advances. Arrivals are accepted on any clock (one per input
// per clock) and a packet that finds its VOQ full is dropped (in_drop). Output
// links take packets with a valid/ready handshake.
//
// The structure, the weight, the probability and the tag follow the MQAS/IPS
// scheme; queue depths, the drop policy, the handshakes and the cycle timing are
// this design's choices.
module mqas_router
  import mqas_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned VOQ_DEPTH = 8,
  parameter int unsigned OQ_DEPTH  = 16,
  parameter int unsigned TIME_W    = 32,
  localparam int unsigned WP_W     = wp_width(TIME_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // input links
  input  logic [N-1:0]      in_valid,
  input  pkt_t              in_pkt [N],
  output logic [N-1:0]      in_drop,
  // output links
  output logic [N-1:0]      out_valid,
  input  logic [N-1:0]      out_ready,
  output tagged_pkt_t       out_pkt [N],
  // time-slot status
  output logic              slot_end,
  output logic [TIME_W-1:0] slot_now
);

  logic [N-1:0]      req [N];
  logic [WP_W-1:0]   wp  [N][N];
  logic [N-1:0]      oq_full;
  logic [N-1:0]      out_match_valid, in_grant_valid;
  logic [PORT_W-1:0] out_match_in [N];
  logic [PROB_W-1:0] out_prob [N];
  logic [PORT_W-1:0] in_grant_out [N];
  logic [N-1:0]      egress_valid, xbar_valid;
  pkt_t              egress_pkt [N];
  pkt_t              xbar_pkt [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    voq_input_port #(.N(N), .DEPTH(VOQ_DEPTH), .TIME_W(TIME_W), .PORT(i)) u_port (
      .clk, .rst_n,
      .arr_valid(in_valid[i]), .arr_pkt(in_pkt[i]), .arr_drop(in_drop[i]),
      .now(slot_now), .req(req[i]), .wp(wp[i]),
      .grant_valid(in_grant_valid[i]), .grant_out(in_grant_out[i]),
      .slot_end(slot_end),
      .egress_valid(egress_valid[i]), .egress_pkt(egress_pkt[i])
    );
  end

  ips_scheduler #(.N(N), .TIME_W(TIME_W)) u_sched (
    .clk, .rst_n,
    .req(req), .wp(wp), .oq_full(oq_full),
    .slot_end(slot_end), .now(slot_now),
    .out_match_valid(out_match_valid), .out_match_in(out_match_in), .out_prob(out_prob),
    .in_grant_valid(in_grant_valid), .in_grant_out(in_grant_out)
  );

  crossbar #(.N(N)) u_xbar (
    .in_valid(egress_valid), .in_pkt(egress_pkt),
    .sel_valid(out_match_valid), .sel(out_match_in),
    .out_valid(xbar_valid), .out_pkt(xbar_pkt)
  );

  for (genvar j = 0; j < N; j++) begin : g_out
    tagged_pkt_t oq_in;
    always_comb begin
      oq_in.pkt  = xbar_pkt[j];
      oq_in.hbwp = 1'b1;
      oq_in.prob = out_prob[j];
    end

    output_queue #(.DEPTH(OQ_DEPTH)) u_oq (
      .clk, .rst_n,
      .push(xbar_valid[j]), .push_pkt(oq_in), .full(oq_full[j]),
      .link_valid(out_valid[j]), .link_ready(out_ready[j]), .link_pkt(out_pkt[j])
    );

    // Every matched pair moves a packet in the transfer cycle.
    assert property (@(posedge clk) disable iff (!rst_n)
                     (slot_end && out_match_valid[j]) |-> xbar_valid[j])
      else $error("mqas_router: matched output %0d received no packet", j);
  end

endmodule
