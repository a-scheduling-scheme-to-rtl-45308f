// tb_mqas_router_starvation: checks that the waiting-time term of the IPS weight
// prevents starvation, with a bound worked out from the weight formula.
//
// Inputs 1..15 keep their VOQs for output 0 permanently full of 1500-byte
// packets. Input 0 first sends one 40-byte packet to output 0 while it is idle,
// which is served at once in slot s1 and sets the VOQ's last-service time to s1.
// Input 0 then sends a second 40-byte packet. The fifteen large-packet inputs
// tie on size, so they are served in turn and the one chosen has waited about 15
// slots: weight 2*1500 + 15 = 3015. The small packet's weight is 2*40 + (s - s1),
// so it must win once s - s1 reaches about 3015 - 80 = 2935 slots, and not much
// earlier. The testbench checks that the small packet is granted in slot
// s1 + 2935 +- 20, and that in between output 0 carried only large packets,
// one per slot.
module tb_mqas_router_starvation;
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
  assign out_ready = '1;

  int checks = 0, failures = 0;
  int s1 = -1, s2 = -1, n_big = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watch the matching of output 0 in each transfer cycle.
  always @(negedge clk) if (rst_n && slot_end && dut.u_sched.out_match_valid[0]) begin
    if (dut.u_sched.out_match_in[0] == '0) begin
      if (s1 < 0) s1 = int'(slot_now);
      else if (s2 < 0) s2 = int'(slot_now);
    end else if (s1 >= 0 && s2 < 0) begin
      n_big++;
    end
  end

  initial begin
    int t;
    in_valid = '0;
    for (int i = 0; i < N; i++) begin
      in_pkt[i]      = '0;
      in_pkt[i].dst  = '0;
      in_pkt[i].size = SIZE_W'(1500);
      in_pkt[i].id   = ID_W'(i);
    end
    in_pkt[0].size = SIZE_W'(40);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // first small packet on an idle router
    in_valid[0] = 1'b1;
    @(posedge clk);
    #1 in_valid[0] = 1'b0;
    wait (s1 >= 0);
    // fill the large-packet VOQs, then the second small packet
    in_valid = N'(16'hFFFE);
    repeat (10) @(posedge clk);
    #1 in_valid[0] = 1'b1;
    @(posedge clk);
    #1 in_valid[0] = 1'b0;
    // keep the large-packet VOQs topped up until the small packet is granted
    t = 0;
    while (s2 < 0 && t < 30000) begin
      @(posedge clk);
      t++;
    end
    in_valid = '0;
    @(negedge clk);
    $display("first small packet in slot %0d, second in slot %0d (waited %0d slots, %0d large packets between)",
             s1, s2, s2 - s1, n_big);
    checks++;
    if (s2 < 0) fail("small packet starved");
    checks++;
    if (s2 - s1 < 2935 - 20 || s2 - s1 > 2935 + 20)
      fail($sformatf("small packet won after %0d slots, expected about 2935", s2 - s1));
    checks++;
    if (n_big < s2 - s1 - 20) fail($sformatf("only %0d large packets served meanwhile", n_big));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
