// sobel_grad: first-order derivative (Sobel) of a pixel stream.
//
// A 3 x 3 window from two line buffers feeds two Sobel operators:
//     Sx = [-1 0 1; -2 0 2; -1 0 1]      Sy = [1 2 1; 0 0 0; -1 -2 -1]
// Each row of the window is reduced by its own adder (weights -1/0/1, the
// doubled middle row by a shift), and a final adder combines the three row
// sums, as in the source design's derivative diagram; Iy uses the same
// structure over columns. Sign convention follows the printed operators:
// Ix = right - left, Iy = top - bottom. Only additions, subtractions and
// shifts are used. The two-level adder is split over two registers here
// (row sums, then total), which is this design's choice, as is a zero
// gradient where the window leaves the frame.
//
// Stream: see window_gen. Output beat for input (x, y) appears 4 clocks later
// with the same coordinates and holds the gradients centred at (x-1, y-1).
module sobel_grad
  import harris_pkg::*;
#(
  parameter int unsigned W = IMG_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [COORD_W-1:0]       in_x,
  input  logic [COORD_W-1:0]       in_y,
  input  logic [PIX_W-1:0]         in_data,
  output logic                     out_valid,
  output logic [COORD_W-1:0]       out_x,
  output logic [COORD_W-1:0]       out_y,
  output logic signed [GRAD_W-1:0] out_ix,
  output logic signed [GRAD_W-1:0] out_iy
);

  logic               wv, winside;
  logic [COORD_W-1:0] wx, wy;
  logic [PIX_W-1:0]   win [3][3];

  window_gen #(.DW(PIX_W), .K(3), .W(W)) u_win (
    .clk, .rst_n,
    .in_valid, .in_x, .in_y, .in_data,
    .out_valid(wv), .out_x(wx), .out_y(wy), .out_inside(winside), .win(win)
  );

  function automatic logic signed [GRAD_W-1:0] px(input logic [PIX_W-1:0] v);
    return GRAD_W'(v);
  endfunction

  // Level 1: one adder per row (for Ix) and per column (for Iy).
  logic signed [GRAD_W-1:0] rx [3];
  logic signed [GRAD_W-1:0] ry [3];
  logic                     v1, inside1;
  logic [COORD_W-1:0]       x1, y1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= wv;
  end

  always_ff @(posedge clk) begin
    if (wv) begin
      rx[0] <= px(win[0][2]) - px(win[0][0]);
      rx[1] <= (px(win[1][2]) - px(win[1][0])) <<< 1;
      rx[2] <= px(win[2][2]) - px(win[2][0]);
      ry[0] <= px(win[0][0]) - px(win[2][0]);
      ry[1] <= (px(win[0][1]) - px(win[2][1])) <<< 1;
      ry[2] <= px(win[0][2]) - px(win[2][2]);
      x1      <= wx;
      y1      <= wy;
      inside1 <= winside;
    end
  end

  // Level 2: the final adder.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      out_x  <= x1;
      out_y  <= y1;
      out_ix <= inside1 ? rx[0] + rx[1] + rx[2] : '0;
      out_iy <= inside1 ? ry[0] + ry[1] + ry[2] : '0;
    end
  end

endmodule
