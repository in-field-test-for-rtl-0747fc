// tb_fifo_mem: checks the FIFO storage array.
// Fills all locations with random words, reads each back through the
// asynchronous read port, checks that a write with we low changes nothing,
// and that writes land on the rising edge of wclk only.
`timescale 1ns/1ps
module tb_fifo_mem;
  localparam int DATA_W = 4, DEPTH = 8, AW = 3;
  logic wclk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 wclk = ~wclk;

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.wclk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (200) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge wclk);
        we = 1'b1; waddr = AW'(a); wdata = DATA_W'($urandom); model[a] = wdata;
      end
      @(negedge wclk); we = 1'b0;
      for (int a = 0; a < DEPTH; a++) begin
        raddr = AW'(a); #1;
        check(rdata == model[a], $sformatf("addr %0d read %0h expected %0h", a, rdata, model[a]));
      end
      // write disabled: nothing changes
      @(negedge wclk); we = 1'b0; waddr = 3'd2; wdata = ~model[2];
      @(negedge wclk); raddr = 3'd2; #1;
      check(rdata == model[2], "write with we low changed the array");
      // no write before the rising edge
      @(posedge wclk); #1; we = 1'b1; waddr = 3'd4; wdata = ~model[4];
      raddr = 3'd4; #1;
      check(rdata == model[4], "write before the clock edge");
      @(posedge wclk); #1; model[4] = ~model[4]; we = 1'b0;
      check(rdata == model[4], "write at the clock edge missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
