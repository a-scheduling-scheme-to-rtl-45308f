// tb_ips_scheduler: random request matrices, weights and full output queues are
// held for one time slot each; a reference model of Iterative Probabilistic
// Scheduling in the testbench (visit outputs from a pointer that advances each
// slot; per output take the unmatched requester with the largest weight, lowest
// index on a tie; P = floor(256*wp/sum)) predicts the matching. The testbench
// checks the matching on both the output and the input side, every probability,
// the slot counter, and that the slot lasts exactly one cycle per grant plus the
// transfer cycle. N = 5 exercises the pointer wrap at a size that is not a power
// of two.
module tb_ips_scheduler;
  import mqas_pkg::*;
  localparam int unsigned N = 5, TIME_W = 32;
  localparam int unsigned WP_W = wp_width(TIME_W);

  logic              clk = 0, rst_n = 0;
  logic [N-1:0]      req [N];
  logic [WP_W-1:0]   wp  [N][N];
  logic [N-1:0]      oq_full;
  logic              slot_end;
  logic [TIME_W-1:0] now;
  logic [N-1:0]      out_match_valid, in_grant_valid;
  logic [PORT_W-1:0] out_match_in [N];
  logic [PROB_W-1:0] out_prob [N];
  logic [PORT_W-1:0] in_grant_out [N];

  int checks = 0, failures = 0;

  ips_scheduler #(.N(N), .TIME_W(TIME_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr = 0;
    for (int i = 0; i < N; i++) begin
      req[i] = '0;
      for (int j = 0; j < N; j++) wp[i][j] = '0;
    end
    oq_full = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 3000; s++) begin
      bit m_out [N];
      int m_in [N], m_prob [N], g_out [N];
      bit matched [N], visited [N];
      int grants, cycles, dens;
      #1;
      dens = $urandom_range(1, 9);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          req[i][j] = ($urandom_range(0, 9) < dens);
          wp[i][j]  = (s % 4 == 0) ? WP_W'($urandom_range(0, 3))
                                   : WP_W'({$urandom_range(0, 1), 32'($urandom_range(0, 5000))});
        end
      for (int j = 0; j < N; j++) oq_full[j] = ($urandom_range(0, 5) == 0);
      // reference model
      grants = 0;
      for (int k = 0; k < N; k++) begin
        m_out[k] = 0; m_in[k] = 0; m_prob[k] = 0; g_out[k] = -1; matched[k] = 0; visited[k] = 0;
      end
      forever begin
        int jj, best;
        longint unsigned bw, sum;
        jj = -1;
        for (int d = 0; d < N; d++) begin
          int j, any;
          j = (rr + d) % N;
          any = 0;
          for (int i = 0; i < N; i++) if (req[i][j] && !matched[i]) any = 1;
          if (jj < 0 && !visited[j] && !oq_full[j] && any) jj = j;
        end
        if (jj < 0) break;
        best = -1; bw = 0; sum = 0;
        for (int i = 0; i < N; i++)
          if (req[i][jj] && !matched[i]) begin
            sum += wp[i][jj];
            if (best < 0 || wp[i][jj] > bw) begin best = i; bw = wp[i][jj]; end
          end
        visited[jj] = 1; matched[best] = 1; grants++;
        m_out[jj] = 1; m_in[jj] = best; g_out[best] = jj;
        m_prob[jj] = (bw == sum) ? 256 : int'((bw * 256) / sum);
      end
      // run the slot
      cycles = 0;
      do begin
        @(negedge clk);
        cycles++;
      end while (!slot_end && cycles < 4 * N);
      checks++;
      if (cycles != grants + 1) fail($sformatf("slot %0d took %0d cycles, exp %0d", s, cycles, grants + 1));
      checks++;
      if (longint'(now) != longint'(s)) fail($sformatf("slot counter %0d exp %0d", now, s));
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_match_valid[j] !== m_out[j] ||
            (m_out[j] && (int'(out_match_in[j]) != m_in[j] || int'(out_prob[j]) != m_prob[j])))
          fail($sformatf("slot %0d out %0d: v=%b in=%0d p=%0d exp v=%b in=%0d p=%0d", s, j,
                         out_match_valid[j], out_match_in[j], out_prob[j], m_out[j], m_in[j], m_prob[j]));
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (in_grant_valid[i] !== (g_out[i] >= 0) ||
            (g_out[i] >= 0 && int'(in_grant_out[i]) != g_out[i]))
          fail($sformatf("slot %0d in %0d: v=%b out=%0d exp %0d", s, i, in_grant_valid[i], in_grant_out[i], g_out[i]));
      end
      @(posedge clk);
      rr = (rr + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
