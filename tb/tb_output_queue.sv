// tb_output_queue: pushes tagged packets while a random output link takes them,
// and checks against a reference queue that packets leave in arrival order,
// that `full` rises exactly at DEPTH entries, and that a link held not-ready
// lets the queue fill (the back-pressure the scheduler relies on).
module tb_output_queue;
  import mqas_pkg::*;
  localparam int unsigned DEPTH = 4;

  logic        clk = 0, rst_n = 0;
  logic        push, full, link_valid, link_ready;
  tagged_pkt_t push_pkt, link_pkt;
  tagged_pkt_t model [$];
  int checks = 0, failures = 0, full_seen = 0;

  output_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; link_ready = 0; push_pkt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      #1;
      // push only when not full, as the scheduler does
      push = !full && ($urandom_range(0, 2) != 0);
      push_pkt.pkt.id   = ID_W'(t);
      push_pkt.pkt.size = SIZE_W'($urandom());
      push_pkt.pkt.dst  = PORT_W'(3);
      push_pkt.pkt.src  = PORT_W'($urandom_range(0, 7));
      push_pkt.hbwp     = 1'b1;
      push_pkt.prob     = PROB_W'($urandom_range(0, 256));
      link_ready = (t / 200) % 2 == 1 ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 5) == 0);
      @(negedge clk);
      checks++;
      if (link_valid !== (model.size() != 0) || full !== (model.size() == DEPTH)) begin
        failures++;
        $display("FAIL t=%0d valid=%b full=%b model=%0d", t, link_valid, full, model.size());
      end
      if (full) full_seen++;
      if (link_valid && model.size() != 0) begin
        checks++;
        if (link_pkt !== model[0]) begin
          failures++;
          $display("FAIL t=%0d head id %0d exp %0d", t, link_pkt.pkt.id, model[0].pkt.id);
        end
      end
      @(posedge clk);
      if (link_valid && link_ready && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(push_pkt);
    end
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FAIL queue never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
