// grad_products: the three gradient products Ix*Ix, Iy*Iy and Ix*Iy.
//
// Three signed multipliers, one per entry of the auto-correlation matrix
// before smoothing, as drawn in the source design's overall block diagram.
// The products are registered once. 11-bit gradients give 22-bit signed
// products (Ix*Ix and Iy*Iy are never negative).
//
// Stream: one output per input, 1 clock later, coordinates passed along.
module grad_products
  import harris_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [COORD_W-1:0]       in_x,
  input  logic [COORD_W-1:0]       in_y,
  input  logic signed [GRAD_W-1:0] in_ix,
  input  logic signed [GRAD_W-1:0] in_iy,
  output logic                     out_valid,
  output logic [COORD_W-1:0]       out_x,
  output logic [COORD_W-1:0]       out_y,
  output logic signed [PROD_W-1:0] out_ixx,
  output logic signed [PROD_W-1:0] out_iyy,
  output logic signed [PROD_W-1:0] out_ixy
);

  logic signed [PROD_W-1:0] ix_w, iy_w;
  assign ix_w = PROD_W'(in_ix);
  assign iy_w = PROD_W'(in_iy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_x   <= in_x;
      out_y   <= in_y;
      out_ixx <= ix_w * ix_w;
      out_iyy <= iy_w * iy_w;
      out_ixy <= ix_w * iy_w;
    end
  end

endmodule
