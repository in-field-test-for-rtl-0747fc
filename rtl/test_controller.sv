// test_controller: sequencer of the transparent SOA-MATS++ test.
//
// When test_ctrl rises (the buffer has been switched to test mode) the
// controller loads the test address generators with the first location to
// test and then applies the march element {up(r x, w ~x, r ~x, w x, r x)} to
// num_loc consecutive locations. Each location takes three test-clock
// cycles: READ_X captures the stored flit x into temp and original; INVERT
// writes ~temp on the falling edge and reads it back into temp on the rising
// edge; RESTORE writes ~temp (x again) and reads it back. The comparisons of
// the two read-backs against original run one and two cycles behind in the
// test circuit, so DONE waits for that pipeline to drain (pipe_busy) before
// raising test_done. A mismatch clears no_fault, which stays low until reset.
//
// The document gives the march element, the temp/original/compare scheme and
// the names of the controller's outputs (Fig. 3(b)); the state encoding, the
// three-cycle schedule, the synchroniser on test_ctrl and the sticky fault
// flag are this design's choices. test_ctrl comes from the router-clock
// domain and passes a two-flop synchroniser. test_full is high from the
// moment test_ctrl rises until the controller is back in IDLE; the buffer
// shows it as FULL so the upstream router stops sending.
module test_controller
  import fifo_test_pkg::*;
#(
  parameter int unsigned AW = 3
) (
  input  logic        test_clk,
  input  logic        rst_n,
  input  logic        test_ctrl,         // from the test scheduler (router clock domain)
  input  logic [AW:0] num_loc,           // locations to test, 1..2**AW
  input  logic        mismatch,          // check logic saw a bad compare result
  input  logic        pipe_busy,         // compare pipeline still holds results
  output logic        taddr_load,        // load test address generators
  output logic        taddr_inc,         // advance test address generators
  output logic        ld_temp,           // temp <- data (test read)
  output logic        ld_orig,           // original <- data
  output logic        cmp_en,            // temp holds a read-back to compare
  output logic        inv_restore_read,  // 1: invert read-back (expect all ones), 0: restore (all zeros)
  output logic        test_we,           // test write strobe (falling test-clock edge)
  output logic        test_full,
  output logic        test_done,
  output logic        no_fault
);

  logic        ctrl_meta, ctrl_s;
  test_state_e state;
  logic [AW:0] remaining;

  always_ff @(posedge test_clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_meta <= 1'b0;
      ctrl_s    <= 1'b0;
    end else begin
      ctrl_meta <= test_ctrl;
      ctrl_s    <= ctrl_meta;
    end
  end

  always_ff @(posedge test_clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TS_IDLE;
      remaining <= '0;
      no_fault  <= 1'b1;
    end else begin
      if (mismatch) no_fault <= 1'b0;
      unique case (state)
        TS_IDLE:    if (ctrl_s) state <= TS_LOAD;
        TS_LOAD: begin
          remaining <= num_loc;
          state     <= (num_loc == '0) ? TS_DONE : TS_READ_X;
        end
        TS_READ_X:  state <= TS_INVERT;
        TS_INVERT:  state <= TS_RESTORE;
        TS_RESTORE: begin
          remaining <= remaining - 1'b1;
          state     <= (remaining == 1) ? TS_DONE : TS_READ_X;
        end
        TS_DONE:    if (!ctrl_s) state <= TS_IDLE;
        default:    state <= TS_IDLE;
      endcase
    end
  end

  always_comb begin
    taddr_load       = (state == TS_LOAD);
    taddr_inc        = (state == TS_RESTORE);
    ld_temp          = (state == TS_READ_X) || (state == TS_INVERT) || (state == TS_RESTORE);
    ld_orig          = (state == TS_READ_X);
    cmp_en           = (state == TS_INVERT) || (state == TS_RESTORE);
    inv_restore_read = (state == TS_INVERT);
    test_we          = (state == TS_INVERT) || (state == TS_RESTORE);
    test_full        = test_ctrl || (state != TS_IDLE);
    test_done        = (state == TS_DONE) && !pipe_busy;
  end

endmodule
