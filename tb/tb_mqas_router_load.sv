// tb_mqas_router_load: latency/utilisation sweep of the MQAS router at its
// default size (16 x 16) under the classic input-queued switch workload:
// independent Bernoulli arrivals at every input, each with probability U per
// time slot, destinations uniform over all outputs. Each output link sends one
// packet per time slot.
//
// For U = 0.2 ... 0.95 the testbench warms up, measures for a fixed number of
// slots, then drains the router. It prints the carried throughput per port,
// the mean and maximum latency in time slots (arrival to leaving on the link)
// and the drops, which give the router's latency-utilisation curve. It checks
//   * every accepted packet leaves once, on its output, in order per
//     input/output pair;
//   * below saturation (U <= 0.6) nothing is dropped and the carried load
//     matches the offered load within 10 %;
//   * no time slot takes more than N+1 clock cycles (one per grant plus the
//     transfer), i.e. scheduling is O(N) in time.
module tb_mqas_router_load;
  import mqas_pkg::*;
  localparam int unsigned N       = 16;
  localparam int          WARM    = 300;
  localparam int          MEASURE = 2000;

  logic              clk = 0, rst_n = 0;
  logic [N-1:0]      in_valid, in_drop, out_valid, out_ready;
  pkt_t              in_pkt [N];
  tagged_pkt_t       out_pkt [N];
  logic              slot_end;
  logic [31:0]       slot_now;

  mqas_router dut (.*);

  always #5 clk = ~clk;
  assign out_ready = {N{slot_end}};   // one packet per output per slot

  int checks = 0, failures = 0;
  int unsigned exp_id [N][N][$];
  int unsigned exp_t  [N][N][$];
  bit     measuring = 0;
  longint lat_sum = 0;
  int     lat_max = 0, n_meas_out = 0, n_drop = 0, slot_cycles = 0, max_slot_cycles = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    slot_cycles++;
    if (slot_end) begin
      if (slot_cycles > max_slot_cycles) max_slot_cycles = slot_cycles;
      slot_cycles = 0;
    end
    for (int i = 0; i < N; i++) if (in_valid[i]) begin
      if (in_drop[i]) begin
        if (measuring) n_drop++;
      end else begin
        exp_id[i][in_pkt[i].dst].push_back(int'(in_pkt[i].id));
        exp_t[i][in_pkt[i].dst].push_back(slot_now);
      end
    end
    for (int j = 0; j < N; j++) if (out_valid[j] && out_ready[j]) begin
      int s, lat;
      s = int'(out_pkt[j].pkt.src);
      checks++;
      if (int'(out_pkt[j].pkt.dst) != j || s >= N || exp_id[s][j].size() == 0 ||
          exp_id[s][j][0] != int'(out_pkt[j].pkt.id)) begin
        fail($sformatf("out %0d: unexpected packet id %0d src %0d", j, out_pkt[j].pkt.id, s));
      end else begin
        void'(exp_id[s][j].pop_front());
        lat = int'(slot_now - exp_t[s][j].pop_front());
        if (measuring) begin
          n_meas_out++;
          lat_sum += lat;
          if (lat > lat_max) lat_max = lat;
        end
      end
    end
  end

  function automatic int inside_count();
    int c = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) c += exp_id[i][j].size();
    return c;
  endfunction

  // Offer one slot's worth of arrivals in the first cycle of the next slot.
  task automatic run_slots(input int slots, input int u_pct, input bit offer);
    static int unsigned next_id = 0;
    repeat (slots) begin
      do @(negedge clk); while (!slot_end);
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        in_valid[i]    = offer && ($urandom_range(0, 999) < u_pct * 10);
        in_pkt[i].id   = ID_W'(next_id++);
        in_pkt[i].src  = '0;
        in_pkt[i].dst  = PORT_W'($urandom_range(0, N - 1));
        in_pkt[i].size = SIZE_W'($urandom_range(40, 1500));
      end
      @(posedge clk);
      #1 in_valid = '0;
    end
  endtask

  initial begin
    int loads [6] = '{20, 40, 60, 80, 90, 95};
    in_valid = '0;
    for (int i = 0; i < N; i++) in_pkt[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (loads[k]) begin
      real thr, mean;
      run_slots(WARM, loads[k], 1'b1);
      measuring = 1; lat_sum = 0; lat_max = 0; n_meas_out = 0; n_drop = 0;
      run_slots(MEASURE, loads[k], 1'b1);
      measuring = 0;
      thr  = real'(n_meas_out) / real'(N * MEASURE);
      mean = (n_meas_out > 0) ? real'(lat_sum) / real'(n_meas_out) : 0.0;
      $display("U=%0.2f carried=%0.3f mean_latency=%0.2f slots max_latency=%0d drops=%0d",
               loads[k] / 100.0, thr, mean, lat_max, n_drop);
      if (loads[k] <= 60) begin
        checks++;
        if (n_drop != 0) fail($sformatf("U=%0d%%: %0d drops below saturation", loads[k], n_drop));
        checks++;
        if (thr < 0.9 * loads[k] / 100.0 || thr > 1.1 * loads[k] / 100.0)
          fail($sformatf("U=%0d%%: carried %0.3f", loads[k], thr));
      end
      // drain
      for (int t = 0; t < 400 && inside_count() != 0; t++) run_slots(1, 0, 1'b0);
      checks++;
      if (inside_count() != 0) fail($sformatf("U=%0d%%: %0d packets stuck", loads[k], inside_count()));
    end
    checks++;
    if (max_slot_cycles > N + 1) fail($sformatf("a slot took %0d cycles", max_slot_cycles));
    $display("longest time slot: %0d cycles", max_slot_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
