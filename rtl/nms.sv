// nms: 3 x 3 non-maximum suppression with an Rmax/64 threshold.
//
// A pixel is a corner when its response R is strictly greater than the R of
// each of its eight neighbours and greater than Rmax/64, where Rmax is the
// largest response of a frame. This rule, the 3 x 3 window that traverses
// every pixel and the 1/64 factor come from the source design; the shift
// implements the 1/64. Corner coordinates are recorded as they are found.
//
// Choices of this design: Rmax is the maximum of the previous frame
// (rmax_in, from harris_response), latched when the frame's first beat
// (0, 0) enters; 0 after reset. Only windows lying wholly inside the frame
// are tested. The stream coordinates of this stage lag the image content by
// 1 (this window) + OFS (all stages before it), so the reported corner
// position is the stream coordinate minus OFS + 1, i.e. the position in the
// original image.
//
// Stream: see window_gen. For input (x, y) the decision appears 3 clocks
// later; corner_valid is a one-clock pulse with corner = {R, x, y}.
// frame_done pulses with the decision for the frame's last beat.
module nms
  import harris_pkg::*;
#(
  parameter int unsigned W   = IMG_W,
  parameter int unsigned H   = IMG_H,
  parameter int unsigned OFS = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  input  resp_t              in_r,
  input  resp_t              rmax_in,
  output logic               corner_valid,
  output corner_t            corner,
  output logic               frame_done
);

  logic               wv, winside;
  logic [COORD_W-1:0] wx, wy;
  logic [R_W-1:0]     win [3][3];

  window_gen #(.DW(R_W), .K(3), .W(W)) u_win (
    .clk, .rst_n,
    .in_valid, .in_x, .in_y, .in_data(in_r),
    .out_valid(wv), .out_x(wx), .out_y(wy), .out_inside(winside), .win(win)
  );

  // Threshold for the frame now entering.
  resp_t thr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      thr <= '0;
    else if (in_valid && in_x == '0 && in_y == '0)  thr <= rmax_in >>> 6;
  end

  resp_t centre;
  logic  is_max;
  assign centre = resp_t'(win[1][1]);

  always_comb begin
    is_max = winside && (centre > thr);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && !(centre > resp_t'(win[r][c]))) is_max = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corner_valid <= 1'b0;
      frame_done   <= 1'b0;
    end else begin
      corner_valid <= wv && is_max;
      frame_done   <= wv && (32'(wx) == W - 1) && (32'(wy) == H - 1);
    end
  end

  always_ff @(posedge clk) begin
    if (wv) begin
      corner.r <= centre;
      corner.x <= COORD_W'(wx - COORD_W'(OFS + 1));
      corner.y <= COORD_W'(wy - COORD_W'(OFS + 1));
    end
  end

endmodule
