// tb_corner_matcher: drives corner lists of four frames into the matcher
// (MAX_CORNERS = 8, FIFO depth 2) and checks
//   - the clear after reset (busy for MAX_CORNERS clocks),
//   - no match against the cleared last-frame memory,
//   - matching by equal R, first equal record of the last frame, in the
//     order of the current frame's records,
//   - the drop of corners beyond MAX_CORNERS (and that a dropped corner is
//     never matched),
//   - the stall while a FIFO is full, and the copy of RAM 1 into RAM 2.
module tb_corner_matcher;
  import harris_pkg::*;
  localparam int MAXC = 8;
  logic clk = 0, rst_n = 0;
  logic corner_valid = 0, frame_done = 0;
  corner_t corner = '0;
  logic busy, match_done;
  logic cur_valid, cur_ready = 0, last_valid, last_ready = 0;
  coord_t cur_xy, last_xy;
  logic [3:0] frame_corners, frame_matches;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  int busy_clocks, stall_seen = 0;

  corner_matcher #(.MAX_CORNERS(MAXC), .FIFO_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send one frame of corners; frame_done is given with the last corner.
  task automatic send_frame(input longint rs [], input int base);
    for (int k = 0; k < rs.size(); k++) begin
      @(negedge clk);
      corner_valid = 1; corner.r = resp_t'(rs[k]);
      corner.x = 8'(base + k); corner.y = 8'(base + 2*k);
      frame_done = (k == rs.size() - 1);
      @(negedge clk);
      corner_valid = 0; frame_done = 0;
      if (k != rs.size() - 1) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    if (rs.size() == 0) begin
      @(negedge clk); frame_done = 1; @(negedge clk); frame_done = 0;
    end
  endtask

  task automatic wait_match_done();
    busy_clocks = 0;
    while (!match_done) begin @(negedge clk); busy_clocks++; end
  endtask

  task automatic pop_pair(input int cx, input int cy, input int lx, input int ly);
    int t = 0;
    while (!(cur_valid && last_valid) && t < 100) begin @(negedge clk); t++; end
    check(cur_xy.x == 8'(cx) && cur_xy.y == 8'(cy) && last_xy.x == 8'(lx) && last_xy.y == 8'(ly),
          $sformatf("pair (%0d,%0d)/(%0d,%0d) exp (%0d,%0d)/(%0d,%0d)", cur_xy.x, cur_xy.y,
                    last_xy.x, last_xy.y, cx, cy, lx, ly));
    cur_ready = 1; last_ready = 1;
    @(negedge clk);
    cur_ready = 0; last_ready = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear
    busy_clocks = 0;
    @(negedge clk);
    while (busy) begin @(negedge clk); busy_clocks++; end
    check(busy_clocks >= MAXC - 2 && busy_clocks <= MAXC + 1, $sformatf("clear took %0d clocks", busy_clocks));

    // frame A: nothing to match yet
    send_frame('{100, 200, 300, 400, 500}, 10);
    wait_match_done();
    @(negedge clk);
    check(frame_corners == 5 && frame_matches == 0, "frame A counts");
    check(!cur_valid && !last_valid, "frame A produced no match");
    repeat (12) @(negedge clk);   // copy

    // frame B: 10 corners, two dropped; matches 300, 100, 500 (FIFO depth 2: stall)
    send_frame('{300, 999, 100, 500, 700, 123, 456, 789, 200, 400}, 40);
    while (!match_done) begin
      @(negedge clk);
      if (busy && cur_valid && dut.full1) stall_seen++;
      if (stall_seen == 20) begin
        pop_pair(40, 40, 12, 14);   // 300: current index 0, last index 2
      end
    end
    @(negedge clk);
    check(stall_seen >= 20, "matcher stalled on a full FIFO");
    check(dropped == 2, $sformatf("dropped %0d, expected 2", dropped));
    check(frame_corners == 8 && frame_matches == 3, $sformatf("frame B counts %0d %0d", frame_corners, frame_matches));
    pop_pair(42, 44, 10, 10);       // 100
    pop_pair(43, 46, 14, 18);       // 500
    @(negedge clk);
    check(!cur_valid && !last_valid, "no extra match in frame B (dropped 200/400 unmatched)");
    repeat (12) @(negedge clk);

    // frame C: matches against B (the stored 8 records), 789 and 999
    send_frame('{5, 789, 999}, 80);
    wait_match_done();
    @(negedge clk);
    check(frame_matches == 2, $sformatf("frame C matches %0d", frame_matches));
    pop_pair(81, 82, 47, 54);
    pop_pair(82, 84, 41, 42);
    repeat (6) @(negedge clk);

    // frame D: empty
    send_frame('{}, 0);
    wait_match_done();
    @(negedge clk);
    check(frame_corners == 0 && frame_matches == 0, "empty frame");
    check(!busy, "idle after an empty frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
