// tb_ann_controller: checks the state sequence S0 -> S1 .. S7 -> S8 one clock
// per state, the two-clock S8 with sm_start in its first clock, done rising
// 10 edges after start is sampled, done held in S8 while start stays high,
// the return to S0 once start falls, and done cleared when a new run starts.
module tb_ann_controller;
  import ann_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] step;
  logic sm_start, done;

  ann_controller dut (.clk, .rst_n, .start, .step, .sm_start, .done);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0h expected %0h at %0t", what, got, exp_v, $time);
    end
  endtask

  task automatic run(input int hold_after);
    int edges;
    // start applied before an edge; this edge samples it
    @(negedge clk) start = 1;
    expect_eq("S0 before start", step, 10'h001);
    @(posedge clk); #1;
    edges = 1;
    expect_eq("done cleared", done, 0);
    for (int s = 1; s <= 7; s++) begin
      expect_eq("state", step, 10'(1 << s));
      expect_eq("sm_start low", sm_start, 0);
      @(posedge clk); #1;
      edges++;
    end
    expect_eq("S8 phase 0", step, 10'h100);
    expect_eq("sm_start", sm_start, 1);
    expect_eq("done not yet", done, 0);
    @(posedge clk); #1;
    edges++;
    expect_eq("S8 phase 1", step, 10'h100);
    expect_eq("sm_start once", sm_start, 0);
    expect_eq("done not yet", done, 0);
    @(posedge clk); #1;
    edges++;
    expect_eq("S8 phase 2", step, 10'h100);
    expect_eq("done at edge 10", done, 1);
    expect_eq("edge count", edges, 10);
    // start still high: stay in S8 with done
    repeat (hold_after) begin
      @(posedge clk); #1;
      expect_eq("hold S8", step, 10'h100);
      expect_eq("hold done", done, 1);
    end
    @(negedge clk) start = 0;
    @(posedge clk); #1;
    expect_eq("back to S0", step, 10'h001);
    expect_eq("done kept in S0", done, 1);
    repeat (3) begin
      @(posedge clk); #1;
      expect_eq("idle S0", step, 10'h001);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    #1 expect_eq("reset S0", step, 10'h001);
    expect_eq("reset done", done, 0);
    run(0);
    run(5);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
