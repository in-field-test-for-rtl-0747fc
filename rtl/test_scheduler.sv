// test_scheduler: periodic test initiation counter.
//
// In normal mode the counter counts router-clock cycles; after TEST_PERIOD
// cycles it raises test_ctrl, switching the buffer to test mode regardless
// of how full the buffer is. test_ctrl stays high until the test circuit
// reports test_done (brought into the router clock domain by a two-flop
// synchroniser); the buffer then returns to normal mode and the count
// restarts. A new test is not started while the synchronised done is still
// high from the previous one.
//
// The document describes the counter and its purpose (letting intermittent
// faults become permanent before each test, and testing often enough that
// faults do not accumulate) but gives no period: TEST_PERIOD = 256 router
// cycles is this design's default. Ending the test on test_done is also
// this design's choice.
module test_scheduler #(
  parameter int unsigned TEST_PERIOD = 256
) (
  input  logic clk,        // router clock
  input  logic rst_n,
  input  logic test_done,  // from the test circuit (test clock domain)
  output logic test_ctrl
);

  localparam int unsigned CW = (TEST_PERIOD > 1) ? $clog2(TEST_PERIOD) : 1;

  logic [CW-1:0] count;
  logic          done_meta, done_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_meta <= 1'b0;
      done_s    <= 1'b0;
    end else begin
      done_meta <= test_done;
      done_s    <= done_meta;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      test_ctrl <= 1'b0;
    end else if (test_ctrl) begin
      if (done_s) test_ctrl <= 1'b0;
    end else if (count == CW'(TEST_PERIOD - 1)) begin
      if (!done_s) begin
        test_ctrl <= 1'b1;
        count     <= '0;
      end
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
