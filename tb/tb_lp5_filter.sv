// tb_lp5_filter: random frames, with idle gaps, through the 5x5 filter at
// 8-bit unsigned (pre-filter) and 22-bit signed (low-pass) widths. Each
// output is compared with the template sum computed here, shifted right by
// 4 (floor), or zero where the window is not inside the frame. The 3-clock
// latency is checked on an isolated beat.
module tb_lp5_filter;
  import harris_pkg::*;
  localparam int W = 11, H = 9, FRAMES = 2;
  localparam int TPL [5][5] = '{'{0,0,1,0,0}, '{0,1,1,1,0}, '{1,1,4,1,1}, '{0,1,1,1,0}, '{0,0,1,0,0}};
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic [7:0]  du = 0;
  logic [21:0] ds = 0;
  logic vu, vs;
  logic [COORD_W-1:0] xu, yu, xs, ys;
  logic [7:0]  ou;
  logic [21:0] os;
  int imu [FRAMES][H][W];
  int ims [FRAMES][H][W];
  int checks = 0, failures = 0, fu = 0, fs = 0;

  lp5_filter #(.DW(8),  .SIGNED(1'b0), .W(W)) uu (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_data(du),
    .out_valid(vu), .out_x(xu), .out_y(yu), .out_data(ou));
  lp5_filter #(.DW(22), .SIGNED(1'b1), .W(W)) us (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_data(ds),
    .out_valid(vs), .out_x(xs), .out_y(ys), .out_data(os));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out(input int im [H][W], input int x, input int y);
    int s = 0;
    if (x < 4 || y < 4) return 0;
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) s += TPL[r][c] * im[y-4+r][x-4+c];
    return s >>> 4;
  endfunction

  always @(negedge clk) begin
    if (vu) begin
      int e;
      e = ref_out(imu[fu], int'(xu), int'(yu));
      checks++;
      if (int'(ou) != e) begin failures++; $display("u f%0d (%0d,%0d) got %0d exp %0d", fu, xu, yu, ou, e); end
      if (int'(xu) == W-1 && int'(yu) == H-1) fu++;
    end
    if (vs) begin
      int e;
      e = ref_out(ims[fs], int'(xs), int'(ys));
      checks++;
      if (int'(signed'(os)) != e) begin failures++; $display("s f%0d (%0d,%0d) got %0d exp %0d", fs, xs, ys, signed'(os), e); end
      if (int'(xs) == W-1 && int'(ys) == H-1) fs++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        imu[f][y][x] = int'($urandom_range(0, 255));
        ims[f][y][x] = int'($urandom_range(0, 2097151)) - 1048576;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1; in_x = COORD_W'(x); in_y = COORD_W'(y);
          du = 8'(imu[f][y][x]); ds = 22'(ims[f][y][x]);
          if (f == 1 && x == 6 && y == 6) begin
            @(negedge clk); in_valid = 0;
            @(negedge clk);
            @(negedge clk);
            checks++;
            if (!vu || !vs) begin failures++; $display("latency: no output 3 clocks after input"); end
            @(negedge clk);
            checks++;
            if (vu || vs) begin failures++; $display("latency: extra output beat"); end
          end
        end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (fu != FRAMES || fs != FRAMES) begin failures++; $display("frames out %0d %0d", fu, fs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
