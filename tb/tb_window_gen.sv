// tb_window_gen: streams random frames with random idle gaps through a 3x3
// and a 5x5 window generator and compares every window that lies inside the
// frame with the stored image; also checks the inside flag, the coordinates
// and the two-clock latency.
module tb_window_gen;
  import harris_pkg::*;
  localparam int W = 9, H = 7, FRAMES = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic [7:0] in_data = 0;
  logic v3, v5, ins3, ins5;
  logic [COORD_W-1:0] x3, y3, x5, y5;
  logic [7:0] w3 [3][3];
  logic [7:0] w5 [5][5];
  logic [7:0] img [FRAMES][H][W];
  int checks = 0, failures = 0;
  int frame_o3 = 0, frame_o5 = 0;

  window_gen #(.DW(8), .K(3), .W(W)) u3 (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_data,
    .out_valid(v3), .out_x(x3), .out_y(y3), .out_inside(ins3), .win(w3));
  window_gen #(.DW(8), .K(5), .W(W)) u5 (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_data,
    .out_valid(v5), .out_x(x5), .out_y(y5), .out_inside(ins5), .win(w5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // Check both generators on their output beats.
  always @(negedge clk) begin
    if (v3) begin
      int xx, yy;
      xx = int'(x3); yy = int'(y3);
      checks++;
      if (ins3 !== (xx >= 2 && yy >= 2)) begin failures++; $display("ins3 wrong at %0d,%0d", xx, yy); end
      if (xx >= 2 && yy >= 2)
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
          checks++;
          if (w3[r][c] !== img[frame_o3][yy-2+r][xx-2+c]) begin
            failures++; $display("w3 f%0d (%0d,%0d) [%0d][%0d] %h exp %h", frame_o3, xx, yy, r, c,
                                 w3[r][c], img[frame_o3][yy-2+r][xx-2+c]);
          end
        end
      if (xx == W-1 && yy == H-1) frame_o3++;
    end
    if (v5) begin
      int xx, yy;
      xx = int'(x5); yy = int'(y5);
      checks++;
      if (ins5 !== (xx >= 4 && yy >= 4)) begin failures++; $display("ins5 wrong"); end
      if (xx >= 4 && yy >= 4)
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin
          checks++;
          if (w5[r][c] !== img[frame_o5][yy-4+r][xx-4+c]) begin failures++; $display("w5 mismatch"); end
        end
      if (xx == W-1 && yy == H-1) frame_o5++;
    end
  end

  // Latency: with a single isolated pixel the window appears exactly 2 clocks later.
  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[f][y][x] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 0;
          if (f == 1 && $urandom_range(0, 2) == 0) begin
            @(negedge clk);
          end
          in_valid = 1; in_x = COORD_W'(x); in_y = COORD_W'(y); in_data = img[f][y][x];
          if (f == 2 && x == 3 && y == 3) begin
            // isolated beat for the latency check
            @(negedge clk); in_valid = 0;
            @(negedge clk);
            checks++;
            if (!v3) begin failures++; $display("latency: window not out after 2 clocks"); end
            @(negedge clk);
            checks++;
            if (v3) begin failures++; $display("latency: extra output beat"); end
          end
        end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (frame_o3 != FRAMES || frame_o5 != FRAMES) begin failures++; $display("frames out %0d %0d", frame_o3, frame_o5); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
