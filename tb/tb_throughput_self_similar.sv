// tb_throughput_self_similar: throughput of the online-tested buffer under
// bursty, self-similar traffic, for several test periods.
//
// One traffic source alternates ON and OFF periods whose lengths follow
// Pareto distributions (minimum 1 cycle, capped at 400; shape 1.2 for ON,
// heavy-tailed, and 3 for OFF), the classic way to make self-similar
// traffic; during ON it offers one flit per router cycle, giving a load of
// about 0.7 flit per cycle, high enough that frequent tests cost
// throughput. The same offered pattern feeds four copies of the buffer,
// with TEST_PERIOD = 16, 64, 256 and 1024 router cycles. Each copy has an
// unbounded source queue upstream that writes whenever full is low, and a
// downstream side that pops whenever empty is low.
//
// Checks: every flit comes out of every copy, unchanged and in order (the
// tests are transparent); no copy reports a fault; the fraction of offered
// flits accepted during the measuring window does not grow as the test
// period shrinks; with the longest period it stays within 3% of the offered
// load, while with the shortest period the tests visibly cost throughput.
// Also counted: tests started and cycles where the upstream was stalled by a
// test.
`timescale 1ns/1ps
module tb_throughput_self_similar;
  localparam int DATA_W = 4;
  localparam int NCFG = 4;
  localparam int PERIODS [NCFG] = '{16, 64, 256, 1024};
  localparam int WINDOW = 40000;

  logic clk = 1'b0, test_clk = 1'b1, rst_n = 1'b0;
  always #10 clk = ~clk;
  always #5  test_clk = ~test_clk;

  logic [DATA_W-1:0] data_in [NCFG], data_out [NCFG];
  logic wen_int [NCFG], ren_int [NCFG];
  logic full [NCFG], empty [NCFG], out_valid [NCFG], test_ctrl [NCFG], no_fault [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_buf
    fifo_test_buffer #(.TEST_PERIOD(PERIODS[i])) dut (
      .clk, .test_clk, .rst_n, .data_in(data_in[i]), .wen_int(wen_int[i]), .full(full[i]),
      .ren_int(ren_int[i]), .empty(empty[i]), .data_out(data_out[i]),
      .out_valid(out_valid[i]), .test_ctrl(test_ctrl[i]), .no_fault(no_fault[i])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // Pareto-distributed period length
  function automatic int pareto_len(input real shape);
    real u;
    int  len;
    u = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    len = int'($ceil(u ** (-1.0 / shape)));
    return (len > 400) ? 400 : len;
  endfunction

  logic [DATA_W-1:0] src_q [NCFG][$];
  logic [DATA_W-1:0] ref_q [NCFG][$];
  int  accepted [NCFG], delivered [NCFG], tests [NCFG], stalled [NCFG];
  int  offered = 0, cycle = 0, remaining = 0;
  bit  on = 1'b0, generating = 1'b1, measuring = 1'b1;
  bit  test_ctrl_d [NCFG];

  initial foreach (accepted[i]) begin
    accepted[i] = 0; delivered[i] = 0; tests[i] = 0; stalled[i] = 0; test_ctrl_d[i] = 1'b0;
    wen_int[i] = 1'b0; ren_int[i] = 1'b0; data_in[i] = '0;
  end

  always @(negedge clk) if (rst_n) begin
    logic [DATA_W-1:0] f;
    cycle++;
    // traffic source
    if (generating) begin
      if (remaining == 0) begin
        on = !on;
        remaining = pareto_len(on ? 1.2 : 3.0);
      end
      remaining--;
      if (on) begin
        f = DATA_W'($urandom);
        offered++;
        for (int i = 0; i < NCFG; i++) begin
          src_q[i].push_back(f);
          ref_q[i].push_back(f);
        end
      end
    end
    for (int i = 0; i < NCFG; i++) begin
      // output monitor
      if (out_valid[i]) begin
        logic [DATA_W-1:0] exp;
        exp = ref_q[i].pop_front();
        check(data_out[i] == exp, $sformatf("period %0d: flit %0h expected %0h", PERIODS[i], data_out[i], exp));
        delivered[i]++;
      end
      if (test_ctrl[i] && !test_ctrl_d[i]) tests[i]++;
      test_ctrl_d[i] = test_ctrl[i];
      // upstream and downstream requests
      wen_int[i] = 1'b0;
      if (src_q[i].size() != 0) begin
        if (!full[i]) begin
          wen_int[i] = 1'b1;
          data_in[i] = src_q[i].pop_front();
          if (measuring) accepted[i]++;
        end else if (test_ctrl[i]) stalled[i]++;
      end
      ren_int[i] = !empty[i];
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real thr [NCFG];
    real load;
    int  total_out;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (WINDOW) @(negedge clk);
    #1;
    generating = 1'b0;
    measuring = 1'b0;
    load = real'(offered) / real'(WINDOW);
    // drain every copy
    forever begin
      bit busy;
      busy = 1'b0;
      for (int i = 0; i < NCFG; i++) if (ref_q[i].size() != 0) busy = 1'b1;
      if (!busy) break;
      @(negedge clk);
    end
    $display("offered load %0.3f flits/cycle over %0d cycles (%0d flits)", load, WINDOW, offered);
    for (int i = 0; i < NCFG; i++) begin
      thr[i] = real'(accepted[i]) / real'(WINDOW);
      $display("TEST_PERIOD %5d: accepted %0.3f flits/cycle (%0.1f%% of offered), tests %0d, stalled by test %0d cycles",
               PERIODS[i], thr[i], 100.0 * thr[i] / load, tests[i], stalled[i]);
      check(delivered[i] == offered, $sformatf("period %0d: %0d of %0d flits delivered", PERIODS[i], delivered[i], offered));
      check(no_fault[i], $sformatf("period %0d: fault reported on a fault-free memory", PERIODS[i]));
      check(tests[i] > 0, $sformatf("period %0d: no test started", PERIODS[i]));
      check(stalled[i] > 0, $sformatf("period %0d: upstream never stalled by a test", PERIODS[i]));
      if (i > 0) check(thr[i] + 0.005 >= thr[i-1],
                       $sformatf("throughput grew when the period shrank from %0d to %0d", PERIODS[i], PERIODS[i-1]));
    end
    check(thr[NCFG-1] >= 0.97 * load, "longest test period costs more than 3% of throughput");
    check(thr[0] < 0.95 * thr[NCFG-1], "shortest test period shows no throughput cost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
