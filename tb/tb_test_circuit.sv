// tb_test_circuit: checks the test circuit against a behavioural memory.
// The memory here is a plain array read asynchronously and written on the
// falling edge of test_clk, whose data line may carry a stuck-at bit. The
// test walks the addresses the way the buffer's test address generators
// would (start location + k, modulo the depth, then Gray-coded).
//
// Cases: (1) the 4-bit example word 1010 with a stuck-at-1 in the MSB: after
// the invert read-back the result register must hold 0111 and no_fault must
// fall; (2) random contents, no fault: no_fault stays high and every tested
// word is restored, untested words are never written; (3) a random
// stuck-at-0 or stuck-at-1 on a random bit of a tested location is always
// detected, whatever the stored word; (4) a random up (0->1) or down (1->0)
// transition fault on a random bit of a tested location is always detected.
`timescale 1ns/1ps
module tb_test_circuit;
  localparam int DATA_W = 4, AW = 3, DEPTH = 8;
  logic test_clk = 1'b0, rst_n = 1'b0, test_ctrl = 1'b0;
  logic [DATA_W-1:0] data, test_data;
  logic [AW:0] num_loc = '0, tptr = '0, start = '0;
  logic test_we, taddr_load, taddr_inc, test_full, test_done, no_fault;
  logic [AW-1:0] taddr;
  int checks = 0, failures = 0;

  // behavioural memory with an optional stuck-at bit
  logic [DATA_W-1:0] mem [DEPTH];
  int  writes_at [DEPTH];
  bit  sa_on = 1'b0; int sa_loc = 0, sa_bit = 0; bit sa_val = 1'b0;
  bit  tf_on = 1'b0; bit tf_up = 1'b0;   // transition fault at sa_loc/sa_bit
  logic [DATA_W-1:0] wword;
  logic [DATA_W-1:0] stored;

  always #5 test_clk = ~test_clk;

  always @(posedge test_clk) begin
    if (taddr_load) tptr <= start;
    else if (taddr_inc) tptr <= tptr + 1'b1;
  end
  assign taddr = tptr[AW-1:0] ^ (tptr[AW-1:0] >> 1);

  always_comb begin
    stored = mem[taddr];
    if (sa_on && int'(taddr) == sa_loc) stored[sa_bit] = sa_val;
    data = stored;
  end
  always @(negedge test_clk) if (test_we) begin
    wword = test_data;
    // a cell with a transition fault cannot make the faulty transition
    if (tf_on && int'(taddr) == sa_loc && mem[taddr][sa_bit] == !tf_up && wword[sa_bit] == tf_up)
      wword[sa_bit] = !tf_up;
    mem[taddr] <= wword;
    writes_at[taddr] <= writes_at[taddr] + 1;
  end

  test_circuit #(.DATA_W(DATA_W), .AW(AW)) dut (
    .test_clk, .rst_n, .test_ctrl, .data, .num_loc, .test_data, .test_we,
    .taddr_load, .taddr_inc, .test_full, .test_done, .no_fault
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (5000) @(posedge test_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_dut();
    rst_n = 1'b0;
    @(negedge test_clk); rst_n = 1'b1;
  endtask

  task automatic run(input int s, input int n);
    start = (AW+1)'(s); num_loc = (AW+1)'(n);
    @(negedge test_clk) test_ctrl = 1'b1;
    while (!test_done) @(negedge test_clk);
    test_ctrl = 1'b0;
    repeat (4) @(negedge test_clk);
  endtask

  function automatic int gray_loc(input int p);
    logic [AW-1:0] b;
    b = AW'(p);
    return int'(b ^ (b >> 1));
  endfunction

  initial begin
    logic [DATA_W-1:0] snapshot [DEPTH];
    bit tested [DEPTH];
    int s, n;
    bit saw_0111;

    // (1) the example: 1010 at the tested location, stuck-at-1 in the MSB
    reset_dut();
    foreach (mem[i]) begin mem[i] = 4'b0000; writes_at[i] = 0; end
    mem[gray_loc(2)] = 4'b1010;
    sa_on = 1'b1; sa_loc = gray_loc(2); sa_bit = 3; sa_val = 1'b1;
    saw_0111 = 1'b0;
    fork
      begin
        while (!test_done) begin
          @(posedge test_clk); #1;
          if (dut.result_vld && dut.result_ones && dut.result == 4'b0111) saw_0111 = 1'b1;
        end
      end
      run(2, 1);
    join
    check(saw_0111, "example: invert read-back result is not 0111");
    check(!no_fault, "example: stuck-at-1 in the MSB not detected");
    sa_on = 1'b0;

    // (2) random contents, no fault
    for (int t = 0; t < 12; t++) begin
      reset_dut();
      foreach (mem[i]) begin mem[i] = DATA_W'($urandom); snapshot[i] = mem[i]; writes_at[i] = 0; tested[i] = 0; end
      s = $urandom % 16; n = 1 + $urandom % DEPTH;
      for (int k = 0; k < n; k++) tested[gray_loc(s + k)] = 1'b1;
      run(s, n);
      check(no_fault, $sformatf("fault reported on a fault-free memory (start %0d, %0d locations)", s, n));
      foreach (mem[i]) begin
        check(mem[i] == snapshot[i], $sformatf("location %0d not restored", i));
        check(writes_at[i] == (tested[i] ? 2 : 0), $sformatf("location %0d written %0d times", i, writes_at[i]));
      end
    end

    // (3) random stuck-at faults on tested locations
    for (int t = 0; t < 20; t++) begin
      reset_dut();
      foreach (mem[i]) mem[i] = DATA_W'($urandom);
      s = $urandom % 16; n = 1 + $urandom % DEPTH;
      sa_on = 1'b1; sa_loc = gray_loc(s + ($urandom % n)); sa_bit = $urandom % DATA_W; sa_val = 1'($urandom);
      run(s, n);
      check(!no_fault, $sformatf("stuck-at-%0d at location %0d bit %0d missed", sa_val, sa_loc, sa_bit));
      sa_on = 1'b0;
    end

    // (4) random transition faults on tested locations
    for (int t = 0; t < 20; t++) begin
      reset_dut();
      foreach (mem[i]) mem[i] = DATA_W'($urandom);
      s = $urandom % 16; n = 1 + $urandom % DEPTH;
      tf_on = 1'b1; tf_up = 1'($urandom);
      sa_loc = gray_loc(s + ($urandom % n)); sa_bit = $urandom % DATA_W;
      run(s, n);
      check(!no_fault, $sformatf("%s transition fault at location %0d bit %0d missed",
                                 tf_up ? "up" : "down", sa_loc, sa_bit));
      tf_on = 1'b0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
