// tb_barrier_ctrl: barrier sequence test. executed_barrier must wait for
// the drain condition, drop again if the coprocessor gets busy, and
// barrier_done must follow have_others_done and last until the CPU's ack,
// after which pending is released.
module tb_barrier_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bar_start = 0, all_empty = 0, have_others_done = 0, barrier_done_ack = 0;
  logic executed_barrier, barrier_done, pending;

  barrier_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    all_empty = 1; have_others_done = 1;
    #1 check(!executed_barrier && !pending, "nothing before a barrier instruction");
    all_empty = 0; have_others_done = 0;
    bar_start = 1;
    @(negedge clk);
    bar_start = 0;
    check(pending && !executed_barrier, "pending, not drained");
    repeat (3) @(negedge clk);
    all_empty = 1;
    #1 check(executed_barrier, "executed once drained");
    @(negedge clk);
    all_empty = 0;
    #1 check(!executed_barrier, "withdrawn when busy again");
    @(negedge clk);
    all_empty = 1;
    @(negedge clk);
    check(!barrier_done, "no done before the others");
    have_others_done = 1;
    @(negedge clk);
    have_others_done = 0;
    check(barrier_done && pending, "done after the others");
    repeat (3) @(negedge clk);
    check(barrier_done, "done held until ack");
    barrier_done_ack = 1;
    @(negedge clk);
    barrier_done_ack = 0;
    check(!barrier_done && !pending, "released by ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
