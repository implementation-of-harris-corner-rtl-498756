// lp5_filter: 5 x 5 shift-and-add smoothing filter (pre-filter and low-pass).
//
// The Gaussian kernel is replaced by the integer template
//     1/16 * [0 0 1 0 0; 0 1 1 1 0; 1 1 4 1 1; 0 1 1 1 0; 0 0 1 0 0]
// whose weights are 1 or 4 and whose sum is 16, so the filter needs only
// adders, a left shift by 2 for the centre and a right shift by 4 for the
// normalisation: no multiplier or divider. The template and the use of the
// same smoothing in front of the gradient (pre-filter) and on the three
// gradient products (low-pass filters) follow the source design. The right
// shift truncates (arithmetic shift for SIGNED data), which is this design's
// choice, as is returning zero where the 5 x 5 window leaves the frame.
//
// Stream: see window_gen. Output beat for input (x, y) appears 3 clocks
// after it, with the same coordinates, and holds the filtered value centred
// at (x - 2, y - 2); one output per input, no stalls.
module lp5_filter
  import harris_pkg::*;
#(
  parameter int unsigned DW     = 8,
  parameter bit          SIGNED = 1'b0,
  parameter int unsigned W      = IMG_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  input  logic [DW-1:0]      in_data,
  output logic               out_valid,
  output logic [COORD_W-1:0] out_x,
  output logic [COORD_W-1:0] out_y,
  output logic [DW-1:0]      out_data
);

  localparam int unsigned SW = DW + 6;  // room for x16 growth and a sign bit

  logic               wv, winside;
  logic [COORD_W-1:0] wx, wy;
  logic [DW-1:0]      win [5][5];

  window_gen #(.DW(DW), .K(5), .W(W)) u_win (
    .clk, .rst_n,
    .in_valid, .in_x, .in_y, .in_data,
    .out_valid(wv), .out_x(wx), .out_y(wy), .out_inside(winside), .win(win)
  );

  function automatic logic signed [SW-1:0] ext(input logic [DW-1:0] v);
    if (SIGNED) return SW'(signed'(v));
    else        return SW'(v);
  endfunction

  logic signed [SW-1:0] sum;
  always_comb begin
    sum = ext(win[0][2]) +
          ext(win[1][1]) + ext(win[1][2]) + ext(win[1][3]) +
          ext(win[2][0]) + ext(win[2][1]) + (ext(win[2][2]) <<< 2) +
          ext(win[2][3]) + ext(win[2][4]) +
          ext(win[3][1]) + ext(win[3][2]) + ext(win[3][3]) +
          ext(win[4][2]);
  end

  logic signed [SW-1:0] norm;
  assign norm = sum >>> 4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= wv;
  end

  always_ff @(posedge clk) begin
    if (wv) begin
      out_x    <= wx;
      out_y    <= wy;
      out_data <= winside ? norm[DW-1:0] : '0;
    end
  end

endmodule
