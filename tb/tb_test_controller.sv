// tb_test_controller: checks the sequencer of the transparent march test.
// For several location counts it raises test_ctrl and records the
// controller's outputs cycle by cycle. It checks: one load of the test
// address generators; per location one READ_X cycle (temp and original
// loaded, no write) followed by an invert cycle and a restore cycle (write,
// temp loaded, compare enabled, invert flag 1 then 0) and one address
// increment; test_done exactly 3*num_loc + 3 cycles after the load, once the
// modelled compare pipeline is empty; test_full high from test_ctrl until
// the controller is idle again; no_fault cleared by a mismatch and kept low.
`timescale 1ns/1ps
module tb_test_controller;
  localparam int AW = 3;
  logic test_clk = 1'b0, rst_n = 1'b0, test_ctrl = 1'b0, mismatch = 1'b0;
  logic [AW:0] num_loc = '0;
  logic pipe_busy, taddr_load, taddr_inc, ld_temp, ld_orig, cmp_en, inv_restore_read;
  logic test_we, test_full, test_done, no_fault;
  logic pend = 1'b0, vld = 1'b0;
  int checks = 0, failures = 0;

  always #5 test_clk = ~test_clk;

  // compare pipeline of the test circuit, two stages behind cmp_en
  always @(posedge test_clk) begin
    vld  <= pend;
    pend <= cmp_en;
  end
  assign pipe_busy = pend | vld;

  test_controller #(.AW(AW)) dut (
    .test_clk, .rst_n, .test_ctrl, .num_loc, .mismatch, .pipe_busy,
    .taddr_load, .taddr_inc, .ld_temp, .ld_orig, .cmp_en, .inv_restore_read,
    .test_we, .test_full, .test_done, .no_fault
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (2000) @(posedge test_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_test(input int n, input bit inject);
    int cyc, loads, incs, writes, origs;
    @(negedge test_clk);
    num_loc = (AW+1)'(n);
    test_ctrl = 1'b1;
    #1 check(test_full, "test_full not raised with test_ctrl");
    while (!taddr_load) begin
      @(negedge test_clk);
      check(test_full, "test_full low during test");
    end
    loads = 1; incs = 0; writes = 0; origs = 0; cyc = 0;
    for (int loc = 0; loc < n; loc++) begin
      @(negedge test_clk); cyc++;
      check(ld_orig && ld_temp && !test_we && !cmp_en, $sformatf("location %0d: read x cycle", loc));
      origs++;
      @(negedge test_clk); cyc++;
      check(test_we && ld_temp && cmp_en && inv_restore_read && !ld_orig && !taddr_inc,
            $sformatf("location %0d: invert cycle", loc));
      writes++;
      if (inject && loc == n - 1) mismatch = 1'b1;
      @(negedge test_clk); cyc++;
      mismatch = 1'b0;
      check(test_we && ld_temp && cmp_en && !inv_restore_read && taddr_inc,
            $sformatf("location %0d: restore cycle", loc));
      writes++; incs++;
    end
    while (!test_done) begin
      @(negedge test_clk); cyc++;
      check(!test_we && !taddr_inc && !taddr_load, "activity after the last location");
    end
    check(cyc == 3 * n + 3, $sformatf("test_done %0d cycles after load, expected %0d", cyc, 3 * n + 3));
    check(writes == 2 * n && incs == n && origs == n && loads == 1, "operation counts");
    check(test_full, "test_full low at done");
    test_ctrl = 1'b0;
    repeat (4) @(negedge test_clk);
    check(!test_done && !test_full, "controller did not return to idle");
  endtask

  initial begin
    @(negedge test_clk); rst_n = 1'b1;
    @(negedge test_clk);
    check(!test_full && !test_we && no_fault, "idle after reset");
    run_test(1, 1'b0);
    run_test(5, 1'b0);
    run_test(8, 1'b0);
    check(no_fault, "no_fault cleared without a mismatch");
    run_test(3, 1'b1);
    check(!no_fault, "mismatch not recorded");
    run_test(2, 1'b0);
    check(!no_fault, "no_fault did not stay low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
