// mqas_pkg: types and constants shared by the multistage queuing and scheduling
// (MQAS) router.
//
// A packet travels through the router as a descriptor: an identifier, the input
// port it came in on, the output port it is headed for and its size in bytes. The
// size is what the scheduler uses as the packet's estimated bandwidth. After the
// scheduler has picked a packet it is tagged as the highest-bandwidth packet (HBWP)
// of its time slot and carries the transmission probability it was chosen with.
//
// Widths are fixed here rather than per instance so that every block agrees on the
// descriptor layout: PORT_W allows up to 256 ports, SIZE_W covers packets up to
// 2047 bytes (an Ethernet MTU of 1500 fits), and probabilities are unsigned Q1.8
// numbers in which PROB_ONE (256) stands for 1.0. These widths are this design's
// own choice.
package mqas_pkg;

  localparam int unsigned PORT_W   = 8;
  localparam int unsigned SIZE_W   = 11;
  localparam int unsigned ID_W     = 16;
  localparam int unsigned PROB_W   = 9;
  localparam int unsigned PROB_ONE = 256;

  typedef struct packed {
    logic [ID_W-1:0]   id;    // identifier, carried unchanged
    logic [PORT_W-1:0] src;   // input port, stamped by the input port
    logic [PORT_W-1:0] dst;   // output port, given with the packet
    logic [SIZE_W-1:0] size;  // length in bytes: the estimated bandwidth eBW
  } pkt_t;

  typedef struct packed {
    pkt_t              pkt;
    logic              hbwp;  // highest-bandwidth-packet tag
    logic [PROB_W-1:0] prob;  // probability it won its output with, Q1.8
  } tagged_pkt_t;

  // Width of a packet weight WP = 2*size + wait, for a TIME_W-bit wait.
  function automatic int unsigned wp_width(int unsigned time_w);
    return ((SIZE_W + 1 > time_w) ? SIZE_W + 1 : time_w) + 1;
  endfunction

  // Width of an index into N ports (at least 1).
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
