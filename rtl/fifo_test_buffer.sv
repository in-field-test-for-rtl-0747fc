// fifo_test_buffer: NoC router input-channel FIFO buffer with a built-in,
// transparent, periodic test for permanent faults in its memory.
//
// Normal mode (test_ctrl low, router clock clk): a synchronous FIFO. The
// upstream router writes data_in with wen_int while full is low; the
// downstream side pops with ren_int while empty is low and receives the flit
// on data_out, with out_valid, in the next cycle. Addresses come from the
// normal write and read Gray-code address generators.
//
// Test mode (test_ctrl high): every TEST_PERIOD router cycles the test
// scheduler raises test_ctrl whatever the buffer holds. The buffer is then
// locked: full reads high, empty reads high, and multiplexers switch the
// memory's write data to the test circuit's test_data line, its write strobe
// to the test circuit, its write clock to the inverted test clock (so test
// writes land on falling edges of test_clk and test reads on rising edges),
// and its addresses to the test write/read address generators. The test
// circuit applies {up(r x, w ~x, r ~x, w x, r x)} to the locations that hold
// flits, starting with the location of the flit popped most recently (the
// flit in flight at the switching instant), so num_loc = occupancy + 1, at
// most DEPTH. Each location is restored to its content, so the flits survive
// the test. When the test is done test_ctrl drops and normal traffic resumes.
//
// In-flight flit: a flit popped at the switching edge sits in the output
// register. tmp_test_ctrl, test_ctrl delayed by one router cycle through a
// flip-flop and gated by test_ctrl, keeps data_out on that flit for one
// cycle before the output mux switches to INVALID_FLIT for the rest of the
// test, so the flit is not lost.
//
// Clocks: test_clk is faster than clk. For the write-clock multiplexer to
// switch cleanly, test_clk must be high whenever clk rises (an integer
// multiple of clk with aligned rising edges); test_ctrl changes only on
// rising edges of clk. Lint reports test_ctrl as used both as a data and
// as a clock-select signal: that is the write-clock multiplexer, by design.
// It also reports rst_n as used both asynchronously and synchronously; the
// synchronous use is only the disable condition of the assertions.
// no_fault drops, and stays low, when a test finds a
// faulty bit.
//
// From the document: the structure (muxes mu1..mu7, address generators,
// test circuit, delay flip-flop with mu3, INVALID FLIT on data_out, FULL
// forced in test, read on rising and write on falling test-clock edges) and
// the 4-bit word of its example. This design's own: DEPTH, TEST_PERIOD, the
// invalid-flit code, the out_valid/empty signals, testing the occupied
// locations plus the in-flight one, the output register, and clocking the
// delay flip-flop with the router clock (the document draws test_clk there)
// so that the held flit lasts one full router cycle.
module fifo_test_buffer
  import fifo_test_pkg::*;
#(
  parameter int unsigned       DATA_W       = 4,
  parameter int unsigned       DEPTH        = 8,
  parameter int unsigned       TEST_PERIOD  = 256,
  parameter logic [DATA_W-1:0] INVALID_FLIT = '0
) (
  input  logic              clk,        // router clock
  input  logic              test_clk,   // faster test clock
  input  logic              rst_n,
  // upstream (input channel)
  input  logic [DATA_W-1:0] data_in,
  input  logic              wen_int,
  output logic              full,
  // downstream
  input  logic              ren_int,
  output logic              empty,
  output logic [DATA_W-1:0] data_out,
  output logic              out_valid,
  // test status
  output logic              test_ctrl,
  output logic              no_fault
);

  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------- normal-mode pointers (router clock) ----------------
  logic [AW:0]   wptr, rptr, occupancy;
  logic [AW-1:0] wr_addr, rd_addr;
  logic          full_int, empty_int, push, pop;

  assign occupancy = wptr - rptr;
  assign full_int  = (occupancy == (AW+1)'(DEPTH));
  assign empty_int = (occupancy == '0);
  assign push      = wen_int && !full_int && !test_ctrl;
  assign pop       = ren_int && !empty_int && !test_ctrl;

  gray_addr_gen #(.AW(AW)) u_wr_gen (
    .clk, .rst_n, .load(1'b0), .load_ptr('0), .inc(push), .ptr(wptr), .addr(wr_addr)
  );
  gray_addr_gen #(.AW(AW)) u_rd_gen (
    .clk, .rst_n, .load(1'b0), .load_ptr('0), .inc(pop), .ptr(rptr), .addr(rd_addr)
  );

  // ---------------- test scheduler ----------------
  logic test_done;

  test_scheduler #(.TEST_PERIOD(TEST_PERIOD)) u_sched (
    .clk, .rst_n, .test_done, .test_ctrl
  );

  // ---------------- test circuit and test address generators ----------------
  logic [DATA_W-1:0] mem_data, test_data;
  logic [AW:0]       num_loc, test_start, twptr, trptr;
  logic [AW-1:0]     test_waddr, test_raddr;
  logic              test_we, taddr_load, taddr_inc, test_full;

  assign test_start = rptr - 1'b1;   // location of the most recently popped flit
  assign num_loc    = full_int ? (AW+1)'(DEPTH) : occupancy + 1'b1;

  test_circuit #(.DATA_W(DATA_W), .AW(AW)) u_test (
    .test_clk, .rst_n, .test_ctrl, .data(mem_data), .num_loc, .test_data,
    .test_we, .taddr_load, .taddr_inc, .test_full, .test_done, .no_fault
  );

  gray_addr_gen #(.AW(AW)) u_twr_gen (
    .clk(test_clk), .rst_n, .load(taddr_load), .load_ptr(test_start), .inc(taddr_inc),
    .ptr(twptr), .addr(test_waddr)
  );
  gray_addr_gen #(.AW(AW)) u_trd_gen (
    .clk(test_clk), .rst_n, .load(taddr_load), .load_ptr(test_start), .inc(taddr_inc),
    .ptr(trptr), .addr(test_raddr)
  );

  // ---------------- memory and its input multiplexers ----------------
  logic [DATA_W-1:0] mem_wdata;
  logic [AW-1:0]     mem_waddr, mem_raddr;
  logic              mem_we, mem_wclk;

  assign mem_wdata = test_ctrl ? test_data  : data_in;   // mu1
  assign mem_waddr = test_ctrl ? test_waddr : wr_addr;   // mu4
  assign mem_raddr = test_ctrl ? test_raddr : rd_addr;   // mu5
  assign mem_we    = test_ctrl ? test_we    : push;      // mu7 (enable)
  assign mem_wclk  = test_ctrl ? ~test_clk  : clk;       // write clock: inverted test_clk in test

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_mem (
    .wclk(mem_wclk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_data)
  );

  // ---------------- output path ----------------
  logic [DATA_W-1:0] dout_q;
  logic              out_valid_q, test_ctrl_q, tmp_test_ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_q      <= INVALID_FLIT;
      out_valid_q <= 1'b0;
      test_ctrl_q <= 1'b0;
    end else begin
      if (pop) dout_q <= mem_data;        // normal read (mu6: ren_int)
      out_valid_q <= pop;
      test_ctrl_q <= test_ctrl;           // delay flip-flop
    end
  end

  assign tmp_test_ctrl = test_ctrl ? test_ctrl_q : 1'b0;            // mu3
  assign data_out      = tmp_test_ctrl ? INVALID_FLIT : dout_q;     // mu2
  assign out_valid     = out_valid_q && !tmp_test_ctrl;
  assign full          = test_ctrl ? test_full : full_int;          // FULL mux
  assign empty         = test_ctrl || empty_int;

  // ---------------- handshake rules ----------------
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) wen_int |-> !full)
    else $error("write request while full");
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n) ren_int |-> !empty)
    else $error("read request while empty");
  a_locked_in_test: assert property (@(posedge clk) disable iff (!rst_n) test_ctrl |-> full && empty)
    else $error("buffer not locked in test mode");
  a_test_addr_agree: assert property (@(posedge test_clk) disable iff (!rst_n) twptr == trptr)
    else $error("test write and read address generators disagree");

endmodule
