// harris_top: streaming Harris corner detection and frame-to-frame corner
// matching for a grey-scale camera stream.
//
// Data path (one pixel per clock, raster order, 8-bit grey):
//   pre-filter (5x5 shift-add smoothing) -> Sobel Ix, Iy -> products Ix^2,
//   Iy^2, IxIy -> three 5x5 low-pass filters -> R = det(M) - trace(M)^2/16
//   and Rmax -> 3x3 non-maximum suppression (R > 8 neighbours, R > Rmax/64)
//   -> corner matcher (Block RAM 1/2, FIFO 1/2).
// Every stage is a pipeline, and the stages run concurrently as the image
// arrives, as in the source design; the image is never stored whole, only
// line buffers are kept.
//
// Interface: pixels enter on pix_valid/pix_ready with pix_data; frames are
// exactly W*H accepted pixels, and the frame coordinates are counted here.
// pix_ready drops after a frame's last pixel until that frame's corners
// have been matched against the previous frame's, and after reset while
// Block RAM 2 is cleared. The accepted pixels are passed on registered
// (img_*), the "ordinary image" output. Detected corners are shown on
// corner_valid/corner, with coordinates in the original image. Matched pairs
// leave through two valid/ready ports: cur_* (current frame, FIFO 1) and
// last_* (last frame, FIFO 2), popped independently.
//
// Latency: a corner is reported 16 clocks after the pixel that completes its
// last window enters; its image position lags the stream position by 6
// pixels in x and y (stage window radii 2 + 1 + 2 + 1).
module harris_top
  import harris_pkg::*;
#(
  parameter int unsigned W           = IMG_W,
  parameter int unsigned H           = IMG_H,
  parameter int unsigned A_SHIFT     = 4,
  parameter int unsigned MAX_CORNERS = 256,
  parameter int unsigned FIFO_DEPTH  = 256,
  localparam int unsigned CAW = (MAX_CORNERS > 1) ? $clog2(MAX_CORNERS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // pixel input
  input  logic               pix_valid,
  output logic               pix_ready,
  input  logic [PIX_W-1:0]   pix_data,
  // image pass-through
  output logic               img_valid,
  output logic [COORD_W-1:0] img_x,
  output logic [COORD_W-1:0] img_y,
  output logic [PIX_W-1:0]   img_data,
  // detected corners
  output logic               corner_valid,
  output corner_t            corner,
  output resp_t              rmax_last,
  // matched corners
  output logic               cur_valid,
  input  logic               cur_ready,
  output coord_t             cur_xy,
  output logic               last_valid,
  input  logic               last_ready,
  output coord_t             last_xy,
  // status
  output logic [CAW:0]       frame_corners,
  output logic [CAW:0]       frame_matches,
  output logic [15:0]        dropped
);

  // ------------------------------------------------------------ input side
  logic               acc;
  logic [COORD_W-1:0] x, y;
  logic               wait_match, busy, match_done, frame_done;
  logic               last_px;

  assign pix_ready = !wait_match && !busy;
  assign acc       = pix_valid && pix_ready;
  assign last_px   = (32'(x) == W - 1) && (32'(y) == H - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x          <= '0;
      y          <= '0;
      wait_match <= 1'b0;
    end else begin
      if (acc) begin
        if (32'(x) == W - 1) begin
          x <= '0;
          y <= (32'(y) == H - 1) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
      if (acc && last_px)  wait_match <= 1'b1;
      else if (match_done) wait_match <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) img_valid <= 1'b0;
    else        img_valid <= acc;
  end

  always_ff @(posedge clk) begin
    if (acc) begin
      img_x    <= x;
      img_y    <= y;
      img_data <= pix_data;
    end
  end

  // ------------------------------------------------------------ pre-filter
  logic               pf_v;
  logic [COORD_W-1:0] pf_x, pf_y;
  logic [PIX_W-1:0]   pf_d;

  lp5_filter #(.DW(PIX_W), .SIGNED(1'b0), .W(W)) u_prefilter (
    .clk, .rst_n,
    .in_valid(acc), .in_x(x), .in_y(y), .in_data(pix_data),
    .out_valid(pf_v), .out_x(pf_x), .out_y(pf_y), .out_data(pf_d)
  );

  // ------------------------------------------------------------ gradient
  logic                     g_v;
  logic [COORD_W-1:0]       g_x, g_y;
  logic signed [GRAD_W-1:0] ix, iy;

  sobel_grad #(.W(W)) u_sobel (
    .clk, .rst_n,
    .in_valid(pf_v), .in_x(pf_x), .in_y(pf_y), .in_data(pf_d),
    .out_valid(g_v), .out_x(g_x), .out_y(g_y), .out_ix(ix), .out_iy(iy)
  );

  // ------------------------------------------------------------ products
  logic                     p_v;
  logic [COORD_W-1:0]       p_x, p_y;
  logic signed [PROD_W-1:0] ixx, iyy, ixy;

  grad_products u_products (
    .clk, .rst_n,
    .in_valid(g_v), .in_x(g_x), .in_y(g_y), .in_ix(ix), .in_iy(iy),
    .out_valid(p_v), .out_x(p_x), .out_y(p_y),
    .out_ixx(ixx), .out_iyy(iyy), .out_ixy(ixy)
  );

  // ------------------------------------------------------------ low-pass
  logic               l_v;
  logic [COORD_W-1:0] l_x, l_y;
  logic [PROD_W-1:0]  sa, sb, sc;

  lp5_filter #(.DW(PROD_W), .SIGNED(1'b1), .W(W)) u_lpf_xx (
    .clk, .rst_n,
    .in_valid(p_v), .in_x(p_x), .in_y(p_y), .in_data(ixx),
    .out_valid(l_v), .out_x(l_x), .out_y(l_y), .out_data(sa)
  );

  lp5_filter #(.DW(PROD_W), .SIGNED(1'b1), .W(W)) u_lpf_yy (
    .clk, .rst_n,
    .in_valid(p_v), .in_x(p_x), .in_y(p_y), .in_data(iyy),
    .out_valid(), .out_x(), .out_y(), .out_data(sb)
  );

  lp5_filter #(.DW(PROD_W), .SIGNED(1'b1), .W(W)) u_lpf_xy (
    .clk, .rst_n,
    .in_valid(p_v), .in_x(p_x), .in_y(p_y), .in_data(ixy),
    .out_valid(), .out_x(), .out_y(), .out_data(sc)
  );

  // ------------------------------------------------------------ response
  logic               r_v;
  logic [COORD_W-1:0] r_x, r_y;
  resp_t              r;

  harris_response #(.W(W), .H(H), .A_SHIFT(A_SHIFT)) u_resp (
    .clk, .rst_n,
    .in_valid(l_v), .in_x(l_x), .in_y(l_y),
    .in_a(signed'(sa)), .in_b(signed'(sb)), .in_c(signed'(sc)),
    .out_valid(r_v), .out_x(r_x), .out_y(r_y), .out_r(r),
    .rmax_last(rmax_last)
  );

  // ------------------------------------------------------------ suppression
  nms #(.W(W), .H(H), .OFS(5)) u_nms (
    .clk, .rst_n,
    .in_valid(r_v), .in_x(r_x), .in_y(r_y), .in_r(r), .rmax_in(rmax_last),
    .corner_valid(corner_valid), .corner(corner), .frame_done(frame_done)
  );

  // ------------------------------------------------------------ matching
  corner_matcher #(.MAX_CORNERS(MAX_CORNERS), .FIFO_DEPTH(FIFO_DEPTH)) u_match (
    .clk, .rst_n,
    .corner_valid, .corner, .frame_done,
    .busy, .match_done,
    .cur_valid, .cur_ready, .cur_xy,
    .last_valid, .last_ready, .last_xy,
    .frame_corners, .frame_matches, .dropped
  );

endmodule
