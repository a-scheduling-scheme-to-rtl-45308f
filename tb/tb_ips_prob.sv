// tb_ips_prob: checks the Q1.8 transmission probability floor(256*wp/sum)
// (256 when wp equals the sum) against integer division, over directed cases
// (lone contender, two equal contenders, tiny share) and random pairs wp <= sum.
module tb_ips_prob;
  import mqas_pkg::*;
  localparam int unsigned WP_W  = 33;
  localparam int unsigned SUM_W = 37;

  logic [WP_W-1:0]   wp;
  logic [SUM_W-1:0]  sum;
  logic [PROB_W-1:0] prob;
  int checks = 0, failures = 0;

  ips_prob #(.WP_W(WP_W), .SUM_W(SUM_W)) dut (.wp(wp), .sum(sum), .prob(prob));

  task automatic check(input longint unsigned w, input longint unsigned s);
    longint unsigned exp;
    wp = WP_W'(w); sum = SUM_W'(s);
    #1;
    exp = (w == s) ? 256 : (w * 256) / s;
    checks++;
    if (longint'(prob) != longint'(exp)) begin
      failures++;
      $display("FAIL wp=%0d sum=%0d prob=%0d exp=%0d", w, s, prob, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(3000, 3000);
    check(50, 100);          // 0.5
    check(1, 3);             // 85/256
    check(2, 3);             // 170/256
    check(1, 1000);          // 0
    check(255, 256);
    check(64'h1_FFFF_FFFF, 64'h1F_FFFF_FFFF);
    for (int k = 0; k < 100; k++) begin   // lone contender: P = 1.0
      longint unsigned w;
      w = {$urandom_range(0, 1), 32'($urandom())};
      check(w, w);
    end
    for (int k = 0; k < 3000; k++) begin
      longint unsigned w, s;
      w = {$urandom_range(0, 1), 32'($urandom())};
      if (k % 3 == 0) w = w % 4000;
      s = w + ((k % 2 == 0) ? longint'($urandom_range(0, 20000)) : longint'({$urandom_range(0, 15), 32'($urandom())}));
      check(w, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
