// fifo_mem: SRAM-style storage array of the FIFO buffer.
//
// DEPTH words of DATA_W bits. One write port, written on the rising edge of
// wclk when we is high, and one asynchronous read port: rdata always shows
// the word at raddr. The buffer drives wclk with the router clock in normal
// mode and with the inverted test clock in test mode, so test writes land on
// the falling edge of the test clock while test reads are captured on its
// rising edge. The array is not reset, as an SRAM is not. The document names
// an SRAM-based FIFO memory with write/read enables and addresses; the
// asynchronous read port and edge-triggered write are this design's model.
module fifo_mem #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 8,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              wclk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
