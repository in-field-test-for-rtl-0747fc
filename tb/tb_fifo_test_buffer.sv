// tb_fifo_test_buffer: end-to-end test of the online-tested FIFO buffer at
// its default parameters (4-bit flits, 8 locations, a test every 256 router
// cycles).
//
// An upstream driver writes random flits whenever full is low and a
// downstream driver pops whenever empty is low, at rates that change from
// phase to phase so that the buffer runs empty, half full and full when the
// periodic test starts. A queue holds the flits written; every flit that
// comes out with out_valid must be the queue's head, so any flit lost or
// altered by a test (which must be transparent) is a failure. While the
// buffer is in test mode after the in-flight cycle, data_out must carry the
// invalid flit and out_valid must stay low. The test length is checked
// against 6 + 3*num_loc test-clock cycles from test_ctrl rising to
// test_done.
//
// In the last phase a stuck-at-1 fault is forced on one memory bit. The
// buffer is filled so the next test covers every location, and no_fault
// must fall. Each mechanism (test entry, in-flight flit at the switch,
// invalid flit, full forced by the test, full and empty in normal mode, a
// test of a full buffer, a detected fault) is counted and must occur.
//
// Clocks: clk has a 20 ns period, test_clk 10 ns; their rising edges align.
`timescale 1ns/1ps
module tb_fifo_test_buffer;
  localparam int DATA_W = 4;
  localparam int DEPTH  = 8;
  localparam logic [DATA_W-1:0] INVALID = '0;

  logic clk = 1'b0, test_clk = 1'b1, rst_n = 1'b0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic wen_int = 1'b0, ren_int = 1'b0;
  logic full, empty, out_valid, test_ctrl, no_fault;

  always #10 clk = ~clk;
  always #5  test_clk = ~test_clk;

  fifo_test_buffer dut (
    .clk, .test_clk, .rst_n, .data_in, .wen_int, .full, .ren_int, .empty,
    .data_out, .out_valid, .test_ctrl, .no_fault
  );

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] q[$];
  int wr_pct = 50, rd_pct = 50;
  bit check_data = 1'b1;

  // mechanism counters
  int n_tests = 0, n_inflight = 0, n_invalid = 0, n_full_forced = 0;
  int n_full_normal = 0, n_empty_normal = 0, n_full_tests = 0, n_fault_detect = 0;
  int n_flits = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // drivers and monitor, all on the falling edge of clk
  logic test_ctrl_d = 1'b0;
  always @(negedge clk) if (rst_n) begin
    // monitor the output of the previous cycle
    if (out_valid) begin
      n_flits++;
      if (test_ctrl) n_inflight++;
      if (check_data) begin
        if (q.size() == 0) check(1'b0, "flit out of an empty reference queue");
        else begin
          logic [DATA_W-1:0] exp;
          exp = q.pop_front();
          check(data_out == exp, $sformatf("flit %0h expected %0h", data_out, exp));
        end
      end else if (q.size() != 0) void'(q.pop_front());
    end
    if (test_ctrl && test_ctrl_d) begin
      n_invalid++;
      check(!out_valid && data_out == INVALID, "invalid flit not shown during test");
    end
    if (test_ctrl) check(full && empty, "buffer not locked during test");
    if (test_ctrl && full && dut.occupancy != DEPTH) n_full_forced++;
    if (!test_ctrl && full) n_full_normal++;
    if (!test_ctrl && empty) n_empty_normal++;
    test_ctrl_d = test_ctrl;

    // new requests for the next rising edge
    wen_int = 1'b0;
    ren_int = 1'b0;
    if (!full && ($urandom % 100) < wr_pct) begin
      wen_int = 1'b1;
      data_in = DATA_W'($urandom);
      q.push_back(data_in);
    end
    // pop on the edge that starts a test, to put a flit in flight
    if (!empty && ((($urandom % 100) < rd_pct) ||
                   (dut.u_sched.count == 8'(255) && !test_ctrl && rd_pct > 0)))
      ren_int = 1'b1;
  end

  // test length: test_ctrl rise to test_done, in test-clock cycles
  realtime t_start;
  int      loc_at_start;
  always @(posedge test_ctrl) begin
    n_tests++;
    t_start = $realtime;
    #1;
    loc_at_start = int'(dut.num_loc);
    if (loc_at_start == DEPTH) n_full_tests++;
  end
  always @(posedge dut.test_done) begin
    check($realtime - t_start == real'(6 + 3 * loc_at_start) * 10.0,
          $sformatf("test of %0d locations took %0t", loc_at_start, $realtime - t_start));
  end

  // stuck-at-1 fault on one memory bit, re-applied after every clock edge
  localparam int FAULT_LOC = 5, FAULT_BIT = 2;
  bit inject = 1'b0;
  always @(test_clk) if (inject) begin
    #1 dut.u_mem.mem[FAULT_LOC][FAULT_BIT] = 1'b1;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // phase 1: balanced traffic, a few tests
    wr_pct = 50; rd_pct = 50;
    repeat (2) @(negedge test_ctrl);
    // phase 2: writes dominate, buffer near full at the test
    wr_pct = 90; rd_pct = 20;
    repeat (2) @(negedge test_ctrl);
    // phase 3: reads dominate, buffer near empty at the test
    wr_pct = 15; rd_pct = 90;
    repeat (2) @(negedge test_ctrl);
    // phase 4: buffer full, no reads
    wr_pct = 100; rd_pct = 0;
    @(negedge test_ctrl);
    check(no_fault, "fault reported on a fault-free memory");
    // drain and compare everything that was stored
    wr_pct = 0; rd_pct = 100;
    wait (q.size() == 0);
    repeat (4) @(negedge clk);
    check(q.size() == 0 && empty, "buffer did not drain");
    // phase 5: stuck-at fault, full buffer at the next test
    check_data = 1'b0;
    inject = 1'b1;
    wr_pct = 100; rd_pct = 0;
    @(posedge test_ctrl);
    @(negedge test_ctrl);
    check(!no_fault, "stuck-at fault not detected");
    if (!no_fault) n_fault_detect++;

    $display("mechanisms: tests=%0d inflight=%0d invalid=%0d full_forced=%0d full=%0d empty=%0d full_tests=%0d fault=%0d flits=%0d",
             n_tests, n_inflight, n_invalid, n_full_forced, n_full_normal, n_empty_normal,
             n_full_tests, n_fault_detect, n_flits);
    check(n_tests > 0,        "no test started");
    check(n_inflight > 0,     "no flit in flight at a switch");
    check(n_invalid > 0,      "invalid flit never shown");
    check(n_full_forced > 0,  "full never forced by a test");
    check(n_full_normal > 0,  "buffer never full in normal mode");
    check(n_empty_normal > 0, "buffer never empty in normal mode");
    check(n_full_tests > 0,   "no test of a full buffer");
    check(n_fault_detect > 0, "no fault detected");
    check(n_flits > 100,      "too few flits transferred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
