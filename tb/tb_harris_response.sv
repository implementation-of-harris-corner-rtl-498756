// tb_harris_response: random smoothed products (and the extremes) give R,
// checked against det - trace^2/16 computed here in 64-bit arithmetic, with
// the 2-clock latency. Frames of W x H beats check that rmax_last becomes
// the largest R of each finished frame, and stays 0 before the first one.
module tb_harris_response;
  import harris_pkg::*;
  localparam int W = 5, H = 4, FRAMES = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic signed [PROD_W-1:0] in_a = 0, in_b = 0, in_c = 0;
  logic out_valid;
  logic [COORD_W-1:0] out_x, out_y;
  resp_t out_r, rmax_last;
  int checks = 0, failures = 0;
  longint exp_q [$];
  longint fmax [FRAMES];

  harris_response #(.W(W), .H(H), .A_SHIFT(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      longint e;
      e = exp_q.pop_front();
      checks++;
      if (longint'(out_r) != e) begin failures++; $display("R got %0d exp %0d", out_r, e); end
    end
  end

  initial begin
    longint a, b, c, t, r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      fmax[f] = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (f == 0 && x == 0 && y == 0) begin
            a = 1040400; b = 1040400; c = 0;             // largest det
          end else if (f == 0 && x == 1 && y == 0) begin
            a = 1040400; b = 1040400; c = -1040400;      // det 0, trace large
          end else begin
            a = longint'($urandom_range(0, 1040400));
            b = longint'($urandom_range(0, 1040400));
            c = longint'($urandom_range(0, 2080800)) - 1040400;
            if ($urandom_range(0, 3) == 0) c = 0;
          end
          t = a + b;
          r = a*b - c*c - ((t*t) >>> 4);
          exp_q.push_back(r);
          if (x == 0 && y == 0) fmax[f] = r; else if (r > fmax[f]) fmax[f] = r;
          @(negedge clk);
          in_valid = 1; in_x = COORD_W'(x); in_y = COORD_W'(y);
          in_a = PROD_W'(a); in_b = PROD_W'(b); in_c = PROD_W'(c);
          if (f == 1 && x == 2 && y == 1) begin
            @(negedge clk); in_valid = 0;
            @(negedge clk);
            checks++;
            if (!out_valid) begin failures++; $display("latency: no output 2 clocks after input"); end
          end
          if (x == 3 && y == 0) begin
            // two clocks into a frame the previous frame's maximum is visible
            checks++;
            if (longint'(rmax_last) != ((f == 0) ? 0 : fmax[f-1])) begin
              failures++; $display("frame %0d: rmax_last %0d exp %0d", f, rmax_last, (f == 0) ? 0 : fmax[f-1]);
            end
          end
        end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (longint'(rmax_last) != fmax[FRAMES-1]) begin failures++; $display("final rmax %0d exp %0d", rmax_last, fmax[FRAMES-1]); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
