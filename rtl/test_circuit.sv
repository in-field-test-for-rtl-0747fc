// test_circuit: the test circuit attached to one FIFO buffer.
//
// It holds the datapath of the transparent SOA-MATS++ test and its
// controller. temp captures the word on the memory's data line on every
// test read (rising edge of test_clk); the first read of a location is also
// copied into original. test_data, the word written back, is always the
// complement of temp (inverter, then a buffer enabled only during test
// writes; the buffer is modelled as an AND gate, the line reads zero when
// disabled). The comparator XORs temp with original and the result register
// keeps the outcome: after the invert read-back a fault-free location gives
// all ones, after the restore read-back all zeros. Any other pattern is a
// fault at the bit positions that differ; the check logic reports it to the
// controller, which clears no_fault.
//
// Timing: a read-back is captured in temp at the end of a cycle, compared
// into result at the end of the next, and checked in the cycle after that.
// The blocks, their names and the XOR check follow the document; the
// pipeline and the zero level of the disabled buffer are this design's.
module test_circuit
  import fifo_test_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned AW     = 3
) (
  input  logic              test_clk,
  input  logic              rst_n,
  input  logic              test_ctrl,
  input  logic [DATA_W-1:0] data,        // memory read data
  input  logic [AW:0]       num_loc,
  output logic [DATA_W-1:0] test_data,   // write data in test mode
  output logic              test_we,
  output logic              taddr_load,
  output logic              taddr_inc,
  output logic              test_full,
  output logic              test_done,
  output logic              no_fault
);

  logic [DATA_W-1:0] temp, original, result;
  logic              ld_temp, ld_orig, cmp_en, inv_restore_read;
  logic              cmp_pending, cmp_ones, result_vld, result_ones;
  logic              mismatch, pipe_busy;

  test_controller #(.AW(AW)) u_ctrl (
    .test_clk, .rst_n, .test_ctrl, .num_loc, .mismatch, .pipe_busy,
    .taddr_load, .taddr_inc, .ld_temp, .ld_orig, .cmp_en, .inv_restore_read,
    .test_we, .test_full, .test_done, .no_fault
  );

  always_ff @(posedge test_clk or negedge rst_n) begin
    if (!rst_n) begin
      temp        <= '0;
      original    <= '0;
      result      <= '0;
      cmp_pending <= 1'b0;
      cmp_ones    <= 1'b0;
      result_vld  <= 1'b0;
      result_ones <= 1'b0;
    end else begin
      if (ld_temp) temp     <= data;
      if (ld_orig) original <= data;
      cmp_pending <= cmp_en;
      if (cmp_en) cmp_ones <= inv_restore_read;
      // comparator: bitwise XOR of temp and original
      if (cmp_pending) begin
        result      <= temp ^ original;
        result_ones <= cmp_ones;
      end
      result_vld <= cmp_pending;
    end
  end

  // check logic: all ones expected after the invert read, all zeros after restore
  assign mismatch  = result_vld && (result_ones ? (result != '1) : (result != '0));
  assign pipe_busy = cmp_pending || result_vld;

  // inverter and buffer onto the test_data line
  assign test_data = test_we ? ~temp : '0;

endmodule
