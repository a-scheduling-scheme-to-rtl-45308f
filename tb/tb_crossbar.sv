// tb_crossbar: drives random permutations (with some outputs unconnected and
// some inputs idle) through the fabric and checks every output carries exactly
// the packet of the input it was connected to.
module tb_crossbar;
  import mqas_pkg::*;
  localparam int unsigned N = 6;

  logic [N-1:0]      in_valid, sel_valid, out_valid;
  pkt_t              in_pkt [N], out_pkt [N];
  logic [PORT_W-1:0] sel [N];
  int checks = 0, failures = 0;

  crossbar #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int r, tmp;
        r = $urandom_range(0, i); tmp = perm[i]; perm[i] = perm[r]; perm[r] = tmp;
      end
      for (int i = 0; i < N; i++) begin
        in_valid[i]    = ($urandom_range(0, 7) != 0);
        in_pkt[i].id   = ID_W'($urandom());
        in_pkt[i].src  = PORT_W'(i);
        in_pkt[i].dst  = PORT_W'($urandom_range(0, N - 1));
        in_pkt[i].size = SIZE_W'($urandom());
        sel[i]         = PORT_W'(perm[i]);
        sel_valid[i]   = ($urandom_range(0, 4) != 0);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        logic ev;
        ev = sel_valid[j] && in_valid[perm[j]];
        checks++;
        if (out_valid[j] !== ev || (ev && out_pkt[j] !== in_pkt[perm[j]])) begin
          failures++;
          $display("FAIL t=%0d out %0d sel %0d valid=%b exp=%b", t, j, perm[j], out_valid[j], ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
