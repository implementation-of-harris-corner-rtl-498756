// line_buffer: one image row of storage, the row buffer of the linear buffer.
//
// A simple dual-port RAM of DEPTH words of DW bits: one synchronous write port
// and one synchronous read port. Reading column x of the previous row and
// writing column x of the current row at the same time turns it into a
// one-row delay line. The 8-bit width and depth 256 (one word per column of a
// 256-pixel row) are the source design's row buffer; the two-port form with a
// registered read (rdata valid one clock after re) is this design's choice,
// matching a block RAM. The RAM is not reset: the window logic that reads it
// ignores rows that have not yet been written in the current frame.
module line_buffer #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
