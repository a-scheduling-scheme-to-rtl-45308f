// output_queue: the second MQAS stage, one per output port.
//
// Packets that crossed the fabric are kept in a DEPTH-entry FIFO and sent to the
// output link strictly in the order they arrived. Since contention was already
// resolved at the inputs, at most one packet enters per time slot, so the queue
// only fills when the link is slower than the router; `full` then tells the
// scheduler to leave this output out of the next matchings.
//
// The link uses a valid/ready handshake: link_pkt is the oldest packet and is
// removed at a clock edge where link_valid and link_ready are both high. A packet
// pushed into an empty queue is offered on the next cycle. The FIFO service
// follows the scheme; the handshake and the depth are this design's choices.
module output_queue
  import mqas_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  tagged_pkt_t push_pkt,
  output logic        full,
  output logic        link_valid,
  input  logic        link_ready,
  output tagged_pkt_t link_pkt
);

  logic empty;

  pkt_fifo #(.DEPTH(DEPTH), .T(tagged_pkt_t)) u_fifo (
    .clk, .rst_n,
    .push(push), .push_data(push_pkt),
    .pop(link_valid && link_ready), .head(link_pkt),
    .empty(empty), .full(full)
  );

  assign link_valid = !empty;

  // The scheduler never sends to a full queue.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("output_queue: push into a full queue");

  // A packet offered on the link stays until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (link_valid && !link_ready) |=> (link_valid && link_pkt == $past(link_pkt)))
    else $error("output_queue: link packet changed before it was taken");

endmodule
