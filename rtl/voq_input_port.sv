// voq_input_port: one input port of the MQAS router, the first queuing stage.
//
// The port keeps one virtual output queue (VOQ) for each of the N output ports,
// so a packet blocked behind a busy output never holds up packets for other
// outputs (no head-of-line blocking). Each VOQ is its own DEPTH-entry FIFO.
//
//  * Arrival: a packet offered on arr_valid/arr_pkt is stamped with this port's
//    number (PORT) as its source and written into the VOQ of its destination in
//    the same clock edge. If that VOQ is full, or the destination is not a valid
//    port, the packet is discarded and arr_drop is high in that cycle. One
//    arrival per cycle.
//  * Requests: req[j] is high while VOQ j holds a packet (REQ_{i,j}).
//  * Weights: for every VOQ, an ips_weight unit turns the head packet's size and
//    the time since the VOQ was last served into its weight wp[j].
//  * Service: in the transfer cycle of a time slot (slot_end high) a granted
//    port (grant_valid, grant_out = j) presents the head of VOQ j on
//    egress_valid/egress_pkt, pops it at the clock edge and records the current
//    slot as VOQ j's last-service time.
//
// The scheme gives the per-output queues, the requests and the weight; the FIFO
// organisation, the drop on overflow, and last-service times starting at slot 0
// after reset are this design's choices.
module voq_input_port
  import mqas_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned TIME_W = 32,
  parameter int unsigned PORT   = 0,
  localparam int unsigned WP_W  = wp_width(TIME_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // arrivals
  input  logic              arr_valid,
  input  pkt_t              arr_pkt,
  output logic              arr_drop,
  // scheduler side
  input  logic [TIME_W-1:0] now,
  output logic [N-1:0]      req,
  output logic [WP_W-1:0]   wp [N],
  input  logic              grant_valid,
  input  logic [PORT_W-1:0] grant_out,
  input  logic              slot_end,
  // towards the switching fabric
  output logic              egress_valid,
  output pkt_t              egress_pkt
);

  pkt_t              head [N];
  logic [N-1:0]      full, empty, push, pop;
  logic [TIME_W-1:0] last_service [N];
  pkt_t              stamped;
  logic              dst_ok;

  always_comb begin
    stamped     = arr_pkt;
    stamped.src = PORT_W'(PORT);
    dst_ok      = (int'(arr_pkt.dst) < int'(N));
  end

  for (genvar j = 0; j < N; j++) begin : g_voq
    assign push[j] = arr_valid && dst_ok && (int'(arr_pkt.dst) == j) && !full[j];
    assign pop[j]  = slot_end && grant_valid && (int'(grant_out) == j);

    pkt_fifo #(.DEPTH(DEPTH), .T(pkt_t)) u_q (
      .clk, .rst_n,
      .push(push[j]), .push_data(stamped),
      .pop(pop[j]),   .head(head[j]),
      .empty(empty[j]), .full(full[j])
    );

    ips_weight #(.TIME_W(TIME_W), .WP_W(WP_W)) u_w (
      .size(head[j].size), .now(now), .last_service(last_service[j]), .wp(wp[j])
    );

    always_ff @(posedge clk) begin
      if (!rst_n)      last_service[j] <= '0;
      else if (pop[j]) last_service[j] <= now;
    end
  end

  assign req      = ~empty;
  assign arr_drop = arr_valid && !(|push);

  always_comb begin
    egress_valid = 1'b0;
    egress_pkt   = head[0];
    for (int j = 0; j < N; j++) begin
      if (int'(grant_out) == j) begin
        egress_pkt   = head[j];
        egress_valid = slot_end && grant_valid && !empty[j];
      end
    end
  end

  // A grant is only ever given to a VOQ that has requested.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (slot_end && grant_valid) |-> egress_valid)
    else $error("voq_input_port %0d: grant for empty VOQ %0d", PORT, grant_out);

endmodule
