// tb_test_scheduler: checks the periodic test initiation counter.
// With TEST_PERIOD = 16 it checks that test_ctrl rises exactly 16 router
// cycles after reset and after each test, that it stays high as long as the
// test circuit has not reported test_done, and that it drops three cycles
// after test_done rises (two synchroniser stages, then the register).
`timescale 1ns/1ps
module tb_test_scheduler;
  localparam int P = 16;
  logic clk = 1'b0, rst_n = 1'b0, test_done = 1'b0, test_ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_scheduler #(.TEST_PERIOD(P)) dut (.clk, .rst_n, .test_done, .test_ctrl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      n = 0;
      while (!test_ctrl) begin @(negedge clk); n++; end
      check(n == P, $sformatf("test started after %0d cycles, expected %0d", n, P));
      // hold for a while without done
      repeat (5 + t * 7) begin @(negedge clk); check(test_ctrl, "test_ctrl dropped without test_done"); end
      test_done = 1'b1;
      n = 0;
      while (test_ctrl) begin @(negedge clk); n++; end
      check(n == 3, $sformatf("test_ctrl dropped %0d cycles after done, expected 3", n));
      // the test circuit drops done a few cycles after test_ctrl falls
      repeat (2) @(negedge clk);
      test_done = 1'b0;
      // count from the fall of test_ctrl, which is where the period restarts
      n = 2;
      while (!test_ctrl) begin @(negedge clk); n++; end
      check(n == P, $sformatf("next test after %0d cycles, expected %0d", n, P));
      test_done = 1'b1;
      while (test_ctrl) @(negedge clk);
      repeat (2) @(negedge clk);
      test_done = 1'b0;
      while (!test_ctrl) @(negedge clk);
      test_done = 1'b1;
      while (test_ctrl) @(negedge clk);
      @(negedge clk); test_done = 1'b0;
      @(negedge clk);
      check(!test_ctrl, "restarted too early");
      // continue with a fresh period count from here
      while (!test_ctrl) @(negedge clk);
      test_done = 1'b1;
      while (test_ctrl) @(negedge clk);
      test_done = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
