// tb_mqas_router: end-to-end test of the MQAS router at its default size
// (16 x 16, 8-entry VOQs, 16-entry output queues).
//
// Traffic is generated in four phases:
//   A  uniform Bernoulli arrivals, destinations uniform over all outputs,
//      output links mostly ready;
//   B  a hot spot: every input sends to output 0 at a high rate, so the
//      VOQs for output 0 overflow and drop packets;
//   C  uniform traffic while the links of outputs 0..3 are stalled, so their
//      output queues fill and the scheduler has to leave them out;
//   D  no arrivals, all links ready, until the router is empty.
// A scoreboard checks that every packet that was not dropped leaves exactly once,
// on its own output, with its input port as source, tagged HBWP with a
// probability of at most 1.0, and in order with the other packets of the same
// input/output pair. The testbench also counts how often each mechanism of the
// design occurred and fails if one never did: VOQ overflow, a full output queue
// skipped, several inputs contending for one output, an input already matched
// in the slot being passed over, a smaller packet winning through its waiting
// time, a probability below 1.0 and output-link back-pressure.
module tb_mqas_router;
  import mqas_pkg::*;
  localparam int unsigned N = 16;

  logic              clk = 0, rst_n = 0;
  logic [N-1:0]      in_valid, in_drop, out_valid, out_ready;
  pkt_t              in_pkt [N];
  tagged_pkt_t       out_pkt [N];
  logic              slot_end;
  logic [31:0]       slot_now;

  mqas_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned exp_q [N][N][$];      // ids still inside, per (src, dst)
  int n_in = 0, n_out = 0, n_drop = 0;
  int n_oq_skip = 0, n_contend = 0, n_in_conflict = 0, n_wait_win = 0, n_prob_lt1 = 0, n_backpressure = 0;
  int n_slots = 0;
  logic [SIZE_W-1:0] hsz [N][N];     // head packet size of VOQ (i, j)

  for (genvar i = 0; i < N; i++) begin : g_peek_i
    for (genvar j = 0; j < N; j++) begin : g_peek_j
      assign hsz[i][j] = dut.g_in[i].u_port.head[j].size;
    end
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the design at every falling edge.
  always @(negedge clk) if (rst_n) begin
    // arrivals and drops
    for (int i = 0; i < N; i++) if (in_valid[i]) begin
      if (in_drop[i]) n_drop++;
      else begin
        exp_q[i][in_pkt[i].dst].push_back(int'(in_pkt[i].id));
        n_in++;
      end
    end
    // departures
    for (int j = 0; j < N; j++) begin
      if (out_valid[j] && !out_ready[j]) n_backpressure++;
      if (out_valid[j] && out_ready[j]) begin
        int s;
        s = int'(out_pkt[j].pkt.src);
        n_out++;
        checks++;
        if (int'(out_pkt[j].pkt.dst) != j || s >= N || !out_pkt[j].hbwp || out_pkt[j].prob > PROB_W'(PROB_ONE))
          fail($sformatf("out %0d: bad packet dst=%0d src=%0d hbwp=%b p=%0d", j,
                         out_pkt[j].pkt.dst, s, out_pkt[j].hbwp, out_pkt[j].prob));
        else if (exp_q[s][j].size() == 0 || exp_q[s][j][0] != int'(out_pkt[j].pkt.id))
          fail($sformatf("out %0d: id %0d from %0d not expected next", j, out_pkt[j].pkt.id, s));
        else
          void'(exp_q[s][j].pop_front());
        if (out_pkt[j].prob < PROB_W'(PROB_ONE)) n_prob_lt1++;
      end
    end
    // scheduler mechanisms
    if (slot_end) n_slots++;
    for (int j = 0; j < N; j++) begin
      if (dut.oq_full[j]) begin
        for (int i = 0; i < N; i++) if (dut.req[i][j] && !dut.u_sched.visited[j]) begin
          n_oq_skip++;
          break;
        end
      end
    end
    if (dut.u_sched.any_active) begin
      int o, w, ncand, maxsz;
      o = int'(dut.u_sched.sel_out);
      w = int'(dut.u_sched.best_in);
      ncand = 0; maxsz = 0;
      for (int i = 0; i < N; i++) begin
        if (dut.u_sched.cand[o][i]) begin
          ncand++;
          if (int'(hsz[i][o]) > maxsz) maxsz = int'(hsz[i][o]);
        end
        if (dut.req[i][o] && dut.u_sched.in_grant_valid[i]) n_in_conflict++;
      end
      if (ncand > 1) n_contend++;
      if (int'(hsz[w][o]) < maxsz) n_wait_win++;
    end
  end

  task automatic drive(input int cycles, input int rate_pct, input bit hotspot, input logic [N-1:0] stall);
    static int unsigned next_id = 0;
    repeat (cycles) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        in_valid[i]    = ($urandom_range(0, 99) < rate_pct);
        in_pkt[i].id   = ID_W'(next_id++);
        in_pkt[i].src  = '0;
        in_pkt[i].dst  = hotspot ? '0 : PORT_W'($urandom_range(0, N - 1));
        in_pkt[i].size = SIZE_W'($urandom_range(40, 1500));
        out_ready[i]   = !stall[i] && ($urandom_range(0, 9) != 0);
      end
    end
  endtask

  initial begin
    int left;
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < N; i++) in_pkt[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    drive(3000, 5, 1'b0, '0);            // A
    drive(400, 35, 1'b1, '0);            // B
    drive(1500, 5, 1'b0, N'(16'h000F));  // C
    in_valid = '0;
    for (int t = 0; t < 20000; t++) begin // D
      @(posedge clk);
      #1 out_ready = '1;
      left = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) left += exp_q[i][j].size();
      if (left == 0) break;
    end
    @(negedge clk);
    checks++;
    if (left != 0) fail($sformatf("%0d packets never left the router", left));
    checks++;
    if (n_in != n_out) fail($sformatf("accepted %0d, delivered %0d", n_in, n_out));
    $display("slots=%0d accepted=%0d delivered=%0d dropped=%0d", n_slots, n_in, n_out, n_drop);
    $display("oq_full_skip=%0d contention=%0d input_conflict=%0d wait_win=%0d prob_below_1=%0d backpressure=%0d",
             n_oq_skip, n_contend, n_in_conflict, n_wait_win, n_prob_lt1, n_backpressure);
    checks++; if (n_drop == 0)         fail("no VOQ overflow");
    checks++; if (n_oq_skip == 0)      fail("no full output queue skipped");
    checks++; if (n_contend == 0)      fail("no output contention");
    checks++; if (n_in_conflict == 0)  fail("no input conflict");
    checks++; if (n_wait_win == 0)     fail("waiting time never decided a grant");
    checks++; if (n_prob_lt1 == 0)     fail("no probability below 1");
    checks++; if (n_backpressure == 0) fail("no output link back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
