// fifo_test_pkg: types shared by the online-tested FIFO buffer.
//
// The test controller walks each tested FIFO location through one element of
// the transparent SOA-MATS++ march test, {up(r x, w ~x, r ~x, w x, r x)}, where
// x is whatever flit the location already holds. Reads happen on the rising
// edge of the test clock and writes on its falling edge, so one test-clock
// cycle can write a location and read it back. The states below are the
// controller's; their grouping into one read cycle and two write/read cycles
// per location is this design's own scheduling of the five march operations.
package fifo_test_pkg;

  typedef enum logic [2:0] {
    TS_IDLE    = 3'd0,  // normal mode, waiting for test_ctrl
    TS_LOAD    = 3'd1,  // load the test address generators
    TS_READ_X  = 3'd2,  // r x : temp <- data, original <- data
    TS_INVERT  = 3'd3,  // w ~x (falling edge), r ~x (rising edge), compare
    TS_RESTORE = 3'd4,  // w x  (falling edge), r x  (rising edge), compare
    TS_DONE    = 3'd5   // test finished, wait for test_ctrl to drop
  } test_state_e;

endpackage
