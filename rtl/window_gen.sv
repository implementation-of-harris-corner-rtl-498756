// window_gen: K x K sliding window over a raster pixel stream (linear buffer).
//
// K-1 line buffers hold the previous K-1 rows; each accepted pixel at column
// x reads column x of every stored row, so a full column of K vertically
// adjacent samples appears one clock later. That column is shifted into a
// K x K register matrix, as in the row-buffer-and-register diagram of the
// source design (two row buffers for its 3 x 3 Sobel window, four here when
// K = 5). The column is then written back one row further down the chain.
//
// Stream convention (shared by every stage of the pipeline): each input beat
// carries its own frame coordinates (in_x, in_y). The window is emitted two
// clocks later with the same coordinates; its newest sample (row K-1, column
// K-1) is the pixel at (in_x, in_y), so the window centre is
// (in_x - K/2, in_y - K/2). out_inside is high when the whole window lies in
// the current frame (in_x >= K-1 and in_y >= K-1); consumers produce zero
// otherwise. No backpressure: the stream advances only on in_valid.
// win[r][c]: r = 0 is the oldest row, c = 0 the leftmost column.
module window_gen
  import harris_pkg::*;
#(
  parameter int unsigned DW = 8,
  parameter int unsigned K  = 3,
  parameter int unsigned W  = IMG_W
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
  output logic               out_inside,
  output logic [DW-1:0]      win [K][K]
);

  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;

  // Stage 1: read issued, pixel and coordinates delayed to meet the read data.
  logic               v1;
  logic [COORD_W-1:0] x1, y1;
  logic [DW-1:0]      d1;
  logic [DW-1:0]      col [K];   // col[K-1] newest row, col[0] oldest row

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x1 <= in_x;
      y1 <= in_y;
      d1 <= in_data;
    end
  end

  assign col[K-1] = d1;

  for (genvar i = 0; i < K - 1; i++) begin : g_lb
    // Line buffer i holds row (y - 1 - i); it is fed from the row below it.
    line_buffer #(.DW(DW), .DEPTH(W)) u_lb (
      .clk  (clk),
      .we   (v1),
      .waddr(AW'(x1)),
      .wdata(col[K-1-i]),
      .re   (in_valid),
      .raddr(AW'(in_x)),
      .rdata(col[K-2-i])
    );
  end

  // Stage 2: shift the column into the register matrix.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col[r];
      end
      out_x      <= x1;
      out_y      <= y1;
      out_inside <= (32'(x1) >= K - 1) && (32'(y1) >= K - 1);
    end
  end

endmodule
