// tb_ips_weight: checks the packet weight WP = 2*size + (now - last_service)
// against an independent computation in 64-bit integers, for directed corner
// cases (zero wait, maximum size, time counter wrap-around) and random values.
module tb_ips_weight;
  import mqas_pkg::*;
  localparam int unsigned TIME_W = 32;
  localparam int unsigned WP_W   = wp_width(TIME_W);

  logic [SIZE_W-1:0] size;
  logic [TIME_W-1:0] now, last;
  logic [WP_W-1:0]   wp;
  int checks = 0, failures = 0;

  ips_weight #(.TIME_W(TIME_W)) dut (.size(size), .now(now), .last_service(last), .wp(wp));

  task automatic check(input longint unsigned s, input longint unsigned n, input longint unsigned l);
    longint unsigned w, exp;
    size = SIZE_W'(s); now = TIME_W'(n); last = TIME_W'(l);
    #1;
    w   = (n >= l) ? n - l : (n + (64'd1 << TIME_W)) - l;
    exp = 2 * s + w;
    checks++;
    if (longint'(wp) != longint'(exp)) begin
      failures++;
      $display("FAIL size=%0d now=%0d last=%0d wp=%0d exp=%0d", s, n, l, wp, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(1500, 7, 7);
    check(2047, 0, 0);
    check(64, 100, 40);
    check(0, 5, 32'hFFFF_FFFE);          // wrapped time counter: wait 7
    check(2047, 32'hFFFF_FFFF, 0);        // largest weight
    for (int k = 0; k < 2000; k++) begin
      longint unsigned n, l;
      n = $urandom();
      l = (k % 2 == 0) ? n - $urandom_range(0, 5000) : $urandom();
      check($urandom_range(0, 2047), n, l & 64'hFFFF_FFFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
