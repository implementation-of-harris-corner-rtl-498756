// tb_nms: frames of small random responses (so that ties are frequent)
// through the suppression stage. Each frame's corner list is compared with
// the rule applied here: window inside the frame, centre strictly above its
// eight neighbours and above rmax_in/64, where rmax_in is the value present
// when the frame's first beat entered. Also checks frame_done and the
// coordinate correction (stream position minus OFS+1).
module tb_nms;
  import harris_pkg::*;
  localparam int W = 12, H = 10, FRAMES = 4, OFS = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  resp_t in_r = 0, rmax_in = 0;
  logic corner_valid, frame_done;
  corner_t corner;
  longint im [FRAMES][H][W];
  longint thr [FRAMES];
  int checks = 0, failures = 0, fo = 0, ndone = 0, ncorners = 0;
  int exp_x [$], exp_y [$];
  longint exp_r [$];

  nms #(.W(W), .H(H), .OFS(OFS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference corner list of one frame, in the order the stream finds them.
  task automatic build_expected(input int f);
    for (int y = 2; y < H; y++)
      for (int x = 2; x < W; x++) begin
        longint cval;
        bit ok;
        cval = im[f][y-1][x-1];
        ok = cval > thr[f];
        for (int r = -2; r <= 0; r++) for (int c = -2; c <= 0; c++)
          if (!(r == -1 && c == -1) && !(cval > im[f][y+r][x+c])) ok = 0;
        if (ok) begin
          exp_x.push_back(x - OFS - 1); exp_y.push_back(y - OFS - 1); exp_r.push_back(cval);
        end
      end
  endtask

  always @(negedge clk) begin
    if (corner_valid) begin
      ncorners++;
      checks++;
      if (exp_x.size() == 0) begin failures++; $display("unexpected corner"); end
      else begin
        int ex, ey; longint er;
        ex = exp_x.pop_front(); ey = exp_y.pop_front(); er = exp_r.pop_front();
        if (corner.x != COORD_W'(ex) || corner.y != COORD_W'(ey) || longint'(corner.r) != er) begin
          failures++; $display("corner got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", corner.x, corner.y, corner.r,
                               COORD_W'(ex), COORD_W'(ey), er);
        end
      end
    end
    if (frame_done) begin
      ndone++;
      checks++;
      if (exp_x.size() != 0) begin failures++; $display("frame %0d: %0d corners missing", fo, exp_x.size()); end
      exp_x.delete(); exp_y.delete(); exp_r.delete();
      fo++;
      if (fo < FRAMES) build_expected(fo);
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        im[f][y][x] = (f == 3) ? longint'($urandom_range(0, 1000000)) - 200000
                               : longint'($urandom_range(0, 6)) - 1;
    thr[0] = 0;       // value of rmax_in at frame start, divided by 64
    thr[1] = 64 >>> 6;
    thr[2] = 383 >>> 6;
    thr[3] = -640 >>> 6;
    build_expected(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 4) == 0) @(negedge clk);
          if (x == 0 && y == 0)
            rmax_in = (f == 0) ? 0 : (f == 1) ? 64 : (f == 2) ? 383 : -640;
          else
            rmax_in = resp_t'($urandom);  // must be ignored inside a frame
          in_valid = 1; in_x = COORD_W'(x); in_y = COORD_W'(y); in_r = resp_t'(im[f][y][x]);
        end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (ndone != FRAMES) begin failures++; $display("frame_done %0d times", ndone); end
    checks++;
    if (ncorners < 5) begin failures++; $display("only %0d corners", ncorners); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
