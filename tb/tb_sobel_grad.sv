// tb_sobel_grad: random frames, including full-range 0/255 pixels, through
// the Sobel stage; Ix and Iy are compared with the operators applied here to
// the stored image (zero where the 3x3 window leaves the frame). Checks the
// 4-clock latency and the extreme gradients +-1020.
module tb_sobel_grad;
  import harris_pkg::*;
  localparam int W = 10, H = 8, FRAMES = 3;
  localparam int SX [3][3] = '{'{-1,0,1}, '{-2,0,2}, '{-1,0,1}};
  localparam int SY [3][3] = '{'{1,2,1}, '{0,0,0}, '{-1,-2,-1}};
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic [7:0] in_data = 0;
  logic out_valid;
  logic [COORD_W-1:0] out_x, out_y;
  logic signed [GRAD_W-1:0] out_ix, out_iy;
  int im [FRAMES][H][W];
  int checks = 0, failures = 0, fo = 0, maxabs = 0;

  sobel_grad #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      int ex, ey, x, y;
      x = int'(out_x); y = int'(out_y); ex = 0; ey = 0;
      if (x >= 2 && y >= 2)
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
          ex += SX[r][c] * im[fo][y-2+r][x-2+c];
          ey += SY[r][c] * im[fo][y-2+r][x-2+c];
        end
      checks++;
      if (int'(out_ix) != ex || int'(out_iy) != ey) begin
        failures++; $display("f%0d (%0d,%0d) got %0d,%0d exp %0d,%0d", fo, x, y, out_ix, out_iy, ex, ey);
      end
      if (ex > maxabs) maxabs = ex;
      if (-ey > maxabs) maxabs = -ey;
      if (x == W-1 && y == H-1) fo++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        im[f][y][x] = (f == 0) ? ((x >= 5) ? 255 : 0) :
                      (f == 1) ? ((y >= 4) ? 255 : 0) : int'($urandom_range(0, 255));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1; in_x = COORD_W'(x); in_y = COORD_W'(y); in_data = 8'(im[f][y][x]);
          if (f == 2 && x == 5 && y == 5) begin
            @(negedge clk); in_valid = 0;
            repeat (3) @(negedge clk);
            checks++;
            if (!out_valid) begin failures++; $display("latency: no output 4 clocks after input"); end
            @(negedge clk);
            checks++;
            if (out_valid) begin failures++; $display("latency: extra output beat"); end
          end
        end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (fo != FRAMES) begin failures++; $display("frames out %0d", fo); end
    checks++;
    if (maxabs != 1020) begin failures++; $display("largest gradient %0d, expected 1020", maxabs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
