// tb_voq_input_port: drives random arrivals into one input port (4 outputs,
// 3-entry VOQs) while random grants are served, and checks against a reference
// model kept in SystemVerilog queues:
//   * req[j] is high exactly when the model's VOQ j is non-empty,
//   * wp[j] equals 2*head size + (now - the slot VOQ j was last served),
//   * a packet for a full VOQ or for a port >= N is dropped (arr_drop),
//   * a granted VOQ presents its head packet, stamped with the port number,
//     and pops it at slot_end.
module tb_voq_input_port;
  import mqas_pkg::*;
  localparam int unsigned N = 4, DEPTH = 3, TIME_W = 32, PORT = 2;
  localparam int unsigned WP_W = wp_width(TIME_W);

  logic              clk = 0, rst_n = 0;
  logic              arr_valid, arr_drop, grant_valid, slot_end, egress_valid;
  pkt_t              arr_pkt, egress_pkt;
  logic [TIME_W-1:0] now;
  logic [N-1:0]      req;
  logic [WP_W-1:0]   wp [N];
  logic [PORT_W-1:0] grant_out;

  pkt_t              model [N][$];
  longint unsigned   last [N];
  int checks = 0, failures = 0, drops = 0, pops = 0;

  voq_input_port #(.N(N), .DEPTH(DEPTH), .TIME_W(TIME_W), .PORT(PORT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arr_valid = 0; arr_pkt = '0; grant_valid = 0; grant_out = '0; slot_end = 0; now = '0;
    for (int j = 0; j < N; j++) last[j] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int g;
      #1;
      arr_valid    = ($urandom_range(0, 2) != 0);
      arr_pkt.id   = ID_W'(t);
      arr_pkt.src  = PORT_W'(7);                       // must be replaced by PORT
      arr_pkt.dst  = PORT_W'(($urandom_range(0, 19) == 0) ? N + 1 : $urandom_range(0, N - 1));
      arr_pkt.size = SIZE_W'($urandom_range(1, 1500));
      if (t % 3 == 0) now = now + TIME_W'($urandom_range(1, 4));
      g = $urandom_range(0, N - 1);
      slot_end    = ($urandom_range(0, 2) == 0);
      grant_valid = slot_end && model[g].size() != 0 && ($urandom_range(0, 3) != 0);
      grant_out   = PORT_W'(g);
      @(negedge clk);
      // requests and weights
      for (int j = 0; j < N; j++) begin
        checks++;
        if (req[j] !== (model[j].size() != 0)) begin
          failures++;
          $display("FAIL t=%0d req[%0d]=%b model size %0d", t, j, req[j], model[j].size());
        end
        if (model[j].size() != 0) begin
          longint unsigned exp;
          exp = 2 * longint'(model[j][0].size) + (longint'(now) - longint'(last[j]));
          checks++;
          if (longint'(wp[j]) != longint'(exp)) begin
            failures++;
            $display("FAIL t=%0d wp[%0d]=%0d exp %0d", t, j, wp[j], exp);
          end
        end
      end
      // drop decision
      begin
        logic exp_drop;
        exp_drop = arr_valid && (int'(arr_pkt.dst) >= N || model[arr_pkt.dst].size() == DEPTH);
        checks++;
        if (arr_drop !== exp_drop) begin
          failures++;
          $display("FAIL t=%0d drop=%b exp %b", t, arr_drop, exp_drop);
        end
        if (exp_drop) drops++;
      end
      // egress
      checks++;
      if (egress_valid !== grant_valid) begin
        failures++;
        $display("FAIL t=%0d egress_valid=%b", t, egress_valid);
      end
      if (grant_valid) begin
        pkt_t e;
        e = model[g][0];
        checks++;
        if (egress_pkt !== e || egress_pkt.src != PORT_W'(PORT)) begin
          failures++;
          $display("FAIL t=%0d egress id %0d exp %0d", t, egress_pkt.id, e.id);
        end
      end
      @(posedge clk);
      // a full VOQ drops the arrival even when it is popped in the same cycle
      if (arr_valid && int'(arr_pkt.dst) < N && model[arr_pkt.dst].size() < DEPTH) begin
        pkt_t s;
        s = arr_pkt;
        s.src = PORT_W'(PORT);
        model[arr_pkt.dst].push_back(s);
      end
      if (grant_valid) begin
        void'(model[g].pop_front());
        last[g] = now;
        pops++;
      end
    end
    checks++;
    if (drops == 0 || pops == 0) begin
      failures++;
      $display("FAIL drops=%0d pops=%0d", drops, pops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
