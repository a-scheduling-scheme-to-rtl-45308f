// pkt_fifo: first-in first-out buffer for packet descriptors, used for every
// virtual output queue and every output queue of the router.
//
// The buffer is a DEPTH-entry array with a read and a write pointer that wrap at
// DEPTH (any DEPTH >= 1, not only powers of two) and an occupancy counter. The
// oldest entry is always visible on `head` (show-ahead), so a reader sees the
// packet before it decides to pop it. A push and a pop may happen in the same
// cycle, with the rule that a push into a
// full buffer and a pop from an empty one are ignored. Both take effect at the
// rising clock edge; `count`, `empty` and `full` are registered-state outputs.
// Reset (active low, synchronous) empties the buffer.
module pkt_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter type         T     = mqas_pkg::pkt_t,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              push_data,
  input  logic          pop,
  output T              head,
  output logic          empty,
  output logic          full
);

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic            do_push, do_pop;
  logic [CW-1:0]   count;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign head    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

endmodule
