// tb_gray_addr_gen: checks the Gray-code address generator.
// Counts through two full wraps and checks that the pointer counts in binary,
// that the address equals the reference Gray code of the pointer's low bits
// (computed here bit by bit), that consecutive addresses differ in exactly
// one bit, that every address appears once per wrap, that load has priority
// over inc, and that the counter holds when inc is low.
`timescale 1ns/1ps
module tb_gray_addr_gen;
  localparam int AW = 3;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, inc = 1'b0;
  logic [AW:0] load_ptr = '0, ptr;
  logic [AW-1:0] addr, prev_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gray_addr_gen #(.AW(AW)) dut (.clk, .rst_n, .load, .load_ptr, .inc, .ptr, .addr);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [AW-1:0] ref_gray(input logic [AW-1:0] b);
    logic [AW-1:0] g;
    g[AW-1] = b[AW-1];
    for (int i = AW - 2; i >= 0; i--) g[i] = b[i+1] ^ b[i];
    return g;
  endfunction

  initial begin
    repeat (50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [2**AW];
    @(negedge clk); rst_n = 1'b1;
    check(ptr == 0 && addr == 0, "reset value");
    inc = 1'b1;
    prev_addr = addr;
    for (int k = 1; k <= 2 * 2**AW; k++) begin
      @(negedge clk);
      check(ptr == (AW+1)'(k), $sformatf("ptr %0d expected %0d", ptr, k));
      check(addr == ref_gray(ptr[AW-1:0]), "address is not the Gray code");
      check($countones(addr ^ prev_addr) == 1, "consecutive addresses differ in more than one bit");
      if (k <= 2**AW) seen[addr] = 1'b1;
      prev_addr = addr;
    end
    foreach (seen[i]) check(seen[i], $sformatf("address %0d never produced", i));
    inc = 1'b0;
    @(negedge clk);
    check(ptr == 0, "counter did not hold");
    load = 1'b1; inc = 1'b1; load_ptr = 5'd13 & {(AW+1){1'b1}};
    @(negedge clk);
    check(ptr == load_ptr, "load did not take priority");
    load = 1'b0;
    @(negedge clk);
    check(ptr == load_ptr + 1'b1, "increment after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
