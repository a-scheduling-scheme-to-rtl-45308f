// ips_weight: weight of a packet waiting at the head of a virtual output queue,
// as used by Iterative Probabilistic Scheduling (IPS).
//
//   WP = 2 * eBW + 1 * eQ
//
// eBW is the packet's estimated transmission bandwidth, taken as its size in
// bytes; eQ is its estimated waiting time, the current time slot minus the time
// slot in which its queue was last served. Both factors (2 and 1) and both
// definitions follow the scheduling scheme; the units (bytes and time slots,
// added unscaled) are taken literally from it. The wait is computed modulo
// 2^TIME_W, which only matters after 2^TIME_W slots without service.
//
// Purely combinational.
module ips_weight
  import mqas_pkg::*;
#(
  parameter int unsigned TIME_W = 32,
  parameter int unsigned WP_W   = wp_width(TIME_W)
) (
  input  logic [SIZE_W-1:0] size,
  input  logic [TIME_W-1:0] now,
  input  logic [TIME_W-1:0] last_service,
  output logic [WP_W-1:0]   wp
);

  logic [TIME_W-1:0] wait_slots;

  always_comb begin
    wait_slots = now - last_service;
    wp         = (WP_W'(size) << 1) + WP_W'(wait_slots);
  end

endmodule
