// ips_prob: transmission probability of a packet,
//
//   P = WP / sum(WP)
//
// where the sum runs over every packet contending for the same output queue. The
// result is an unsigned Q1.8 fraction: prob = floor(256 * wp / sum), and exactly
// PROB_ONE (256, i.e. 1.0) when wp equals the sum (a lone contender). The caller
// guarantees wp <= sum, so 0 <= P <= 1 as the scheme requires.
//
// The division is a combinational restoring long division producing the eight
// fraction bits one after the other; it needs only subtractors and comparators
// of SUM_W+1 bits. The fixed-point format is this design's choice.
module ips_prob
  import mqas_pkg::*;
#(
  parameter int unsigned WP_W  = 33,
  parameter int unsigned SUM_W = 37
) (
  input  logic [WP_W-1:0]   wp,
  input  logic [SUM_W-1:0]  sum,
  output logic [PROB_W-1:0] prob
);

  logic [SUM_W:0] rem;

  always_comb begin
    prob = '0;
    rem  = (SUM_W + 1)'(wp);
    if (rem >= {1'b0, sum}) begin
      prob = PROB_W'(PROB_ONE);
    end else begin
      for (int b = PROB_W - 2; b >= 0; b--) begin
        rem = rem << 1;
        if (rem >= {1'b0, sum}) begin
          rem     = rem - {1'b0, sum};
          prob[b] = 1'b1;
        end
      end
    end
  end

endmodule
