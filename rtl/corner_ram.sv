// corner_ram: block RAM holding the corner records of one frame.
//
// DEPTH records of type corner_t (response R and x, y coordinates) with one
// synchronous write port and one synchronous read port (rdata valid one
// clock after re). Two instances hold the corners of the current frame and
// of the last frame, as in the source design; their depth is not given
// there, and 256 records per frame is this design's choice. The memory
// itself is not reset; the matcher clears the last-frame memory after reset.
module corner_ram
  import harris_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  corner_t       wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output corner_t       rdata
);

  corner_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
