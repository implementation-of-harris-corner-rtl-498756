// harris_response: corner response R and its frame maximum Rmax.
//
// With the smoothed products A = w*Ix^2, B = w*Iy^2 and C = w*IxIy the
// auto-correlation matrix is M = [A C; C B], and
//     R = det(M) - a * trace(M)^2 = A*B - C*C - a*(A+B)^2.
// As in the source design, a is a negative power of two, a = 2^-A_SHIFT, so
// the weighting is an arithmetic right shift; A_SHIFT = 4 (a = 0.0625, inside
// the usual 0..0.25 range) is this design's choice. Two register stages:
// the three products, then the difference.
//
// The module also tracks the largest R of each frame (the Rmax that the
// suppression stage compares against). The running maximum is cleared at the
// start of each frame and copied to rmax_last on the frame's last pixel
// (x = W-1, y = H-1); rmax_last is 0 after reset. Using the previous frame's
// maximum for the current frame is this design's choice: a streaming
// pipeline without a frame store cannot know the current frame's maximum
// before the frame has passed.
//
// Stream: one output per input, 2 clocks later, coordinates passed along.
module harris_response
  import harris_pkg::*;
#(
  parameter int unsigned W       = IMG_W,
  parameter int unsigned H       = IMG_H,
  parameter int unsigned A_SHIFT = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [COORD_W-1:0]       in_x,
  input  logic [COORD_W-1:0]       in_y,
  input  logic signed [PROD_W-1:0] in_a,     // smoothed Ix*Ix
  input  logic signed [PROD_W-1:0] in_b,     // smoothed Iy*Iy
  input  logic signed [PROD_W-1:0] in_c,     // smoothed Ix*Iy
  output logic                     out_valid,
  output logic [COORD_W-1:0]       out_x,
  output logic [COORD_W-1:0]       out_y,
  output resp_t                    out_r,
  output resp_t                    rmax_last  // maximum R of the last whole frame
);

  localparam int unsigned PW = 2 * PROD_W + 2;  // product width with headroom

  logic signed [PW-1:0] a_w, b_w, c_w, t_w;
  assign a_w = PW'(in_a);
  assign b_w = PW'(in_b);
  assign c_w = PW'(in_c);
  assign t_w = a_w + b_w;

  // Stage 1: products.
  logic signed [PW-1:0] ab, cc, tt;
  logic                 v1;
  logic [COORD_W-1:0]   x1, y1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      ab <= a_w * b_w;
      cc <= c_w * c_w;
      tt <= t_w * t_w;
      x1 <= in_x;
      y1 <= in_y;
    end
  end

  // Stage 2: R. |A*B|, |C*C| < 2^40 and (A+B)^2 < 2^42, so R fits R_W bits.
  logic signed [PW-1:0] r_full;
  assign r_full = ab - cc - (tt >>> A_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      out_x <= x1;
      out_y <= y1;
      out_r <= resp_t'(r_full);
    end
  end

  // Frame maximum, updated on the output beats.
  resp_t rmax_run;
  logic  first_px, last_px;
  assign first_px = (out_x == '0) && (out_y == '0);
  assign last_px  = (32'(out_x) == W - 1) && (32'(out_y) == H - 1);

  resp_t run_next;
  always_comb begin
    run_next = first_px ? out_r : ((out_r > rmax_run) ? out_r : rmax_run);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rmax_run  <= '0;
      rmax_last <= '0;
    end else if (out_valid) begin
      rmax_run <= run_next;
      if (last_px) rmax_last <= run_next;
    end
  end

endmodule
