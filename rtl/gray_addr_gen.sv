// gray_addr_gen: FIFO address generator built as a Gray-code counter.
//
// The buffer uses four of these: the normal write and read address
// generators, and the test write and read address generators, as in the
// buffer's block diagram, which calls them Gray-code counters. The counter
// keeps a binary pointer one bit wider than the address (the extra bit
// tells a full buffer from an empty one) and presents the Gray code of its
// low AW bits as the memory address, so consecutive addresses differ in one
// bit. Writer and reader use the same mapping, so the FIFO order is kept.
//
// Interface: load has priority over inc; both act on the rising clock edge.
// ptr is the binary pointer, addr its Gray-coded location. Reset clears the
// pointer. Keeping the pointer in binary and converting to Gray is this
// design's choice; the extra wrap bit too.
module gray_addr_gen #(
  parameter int unsigned AW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW:0]   load_ptr,
  input  logic          inc,
  output logic [AW:0]   ptr,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ptr <= '0;
    else if (load) ptr <= load_ptr;
    else if (inc)  ptr <= ptr + 1'b1;
  end

  // binary to Gray: g = b ^ (b >> 1)
  assign addr = ptr[AW-1:0] ^ (ptr[AW-1:0] >> 1);

endmodule
