// crossbar: the router's N x N switching fabric.
//
// Each output j is connected to at most one input, chosen by sel_valid[j] and
// sel[j]; it then carries that input's packet: out_valid[j] is high when the
// connection exists and the input presents a packet. Because the scheduler's
// matching gives every input to at most one output, all N transfers of a time
// slot happen together without conflict. The fabric is purely combinational
// (one N:1 multiplexer per output), the simplest circuit with this function; the
// scheme only states what the fabric does.
module crossbar
  import mqas_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]      in_valid,
  input  pkt_t              in_pkt [N],
  input  logic [N-1:0]      sel_valid,
  input  logic [PORT_W-1:0] sel [N],
  output logic [N-1:0]      out_valid,
  output pkt_t              out_pkt [N]
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = 1'b0;
      out_pkt[j]   = in_pkt[0];
      for (int i = 0; i < N; i++) begin
        if (int'(sel[j]) == i) begin
          out_pkt[j]   = in_pkt[i];
          out_valid[j] = sel_valid[j] && in_valid[i];
        end
      end
    end
  end

endmodule
