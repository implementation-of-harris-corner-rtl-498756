// tb_harris_full: end-to-end test of the corner detector and matcher with
// every parameter at its default: 256 x 256 frames, 256 corner records per
// frame, FIFO depth 256. Same stimulus and checks as tb_harris_top, except
// that a FIFO cannot fill here (a frame has at most 256 matches), so the
// FIFO-full wait is reported but not required. It also bounds the input
// stall after each frame by the matcher's cycle budget, n1 * (n2 + 3) plus
// the pipeline drain, and prints the resulting frame period.
//
// Four frames go through the design: a scene of grey shapes, the same scene
// moved by (3, 2) pixels, random noise, and the scene again. A reference
// model (harris_model_pkg) predicts every corner in stream order, each
// frame's stored count, drops and matches. The testbench checks the corner
// stream, both matched-coordinate FIFOs, the per-frame counters, the image
// pass-through and Rmax, and counts each mechanism of the design, failing
// if one never occurred: the input stall while a frame is matched, the
// stall after reset while the last-frame RAM is cleared, the matcher
// waiting on a full FIFO, corner drops on a full RAM, the Rmax/64
// threshold rejecting a local maximum, and at least one match.
module tb_harris_full;
  import harris_pkg::*;
  import harris_model_pkg::*;

  localparam int W = IMG_W, H = IMG_H, MAXC = 256, NF = 4;
  localparam int CAW = $clog2(MAXC);

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix_data = 0;
  logic img_valid;
  logic [COORD_W-1:0] img_x, img_y;
  logic [7:0] img_data;
  logic corner_valid;
  corner_t corner;
  resp_t rmax_last;
  logic cur_valid, cur_ready = 0, last_valid, last_ready = 0;
  coord_t cur_xy, last_xy;
  logic [CAW:0] frame_corners, frame_matches;
  logic [15:0] dropped;

  harris_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  plane_t   img [NF];
  longint   rmax [NF];
  clist_t   exp_corners, exp_cur, exp_last;
  int       exp_nstored [NF], exp_nmatch [NF], exp_drop = 0, rejected = 0;
  int       n_stall = 0, n_clear_stall = 0, n_fifo_wait = 0, n_matches = 0, n_done = 0;
  int       f_img = 0, n_img = 0, cyc = 0;
  bit       all_sent = 0;
  int       stall_f [NF];
  int       start_cyc [NF];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NF * W * H * 4 + 20000) @(posedge clk);
    failures++;
    $display("watchdog: stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference
  initial begin
    clist_t prev_stored, cl, st, mc, ml;
    int rej;
    img[0] = scene(W, H, 0, 0);
    img[1] = scene(W, H, 3, 2);
    img[2] = noise(W, H);
    img[3] = scene(W, H, 0, 0);
    for (int f = 0; f < NF; f++) begin
      plane_t r;
      r = response(img[f], W, H, 4);
      rmax[f] = plane_max(r);
      cl = corners(r, W, H, (f == 0) ? 0 : rmax[f-1], rej);
      rejected += rej;
      st.delete();
      foreach (cl[k]) begin
        exp_corners.push_back(cl[k]);
        if (k < MAXC) st.push_back(cl[k]); else exp_drop++;
      end
      match(st, prev_stored, mc, ml);
      exp_nstored[f] = st.size();
      exp_nmatch[f]  = mc.size();
      foreach (mc[k]) begin exp_cur.push_back(mc[k]); exp_last.push_back(ml[k]); end
      prev_stored = st;
      $display("model frame %0d: %0d corners, %0d stored, %0d matches, Rmax %0d",
               f, cl.size(), st.size(), mc.size(), rmax[f]);
    end
  end

  // ---------------------------------------------------------- driver
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < W*H; k++) begin
        @(negedge clk);
        if ($urandom_range(0, 9) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_data = 8'(img[f][k]);
        if (k == 0) stall_f[f] = 0;
        while (!pix_ready) begin
          if (f == 0 && k == 0) n_clear_stall++; else n_stall++;
          if (k == 0 && f > 0) stall_f[f-1]++;
          @(negedge clk);
        end
        if (k == 0) start_cyc[f] = cyc;
      end
    @(negedge clk);
    pix_valid = 0;
    all_sent = 1;
  end

  // ---------------------------------------------------------- monitors
  always @(posedge clk) cyc <= cyc + 1;

  // FIFO consumers: mostly not ready, so the FIFOs fill up.
  always @(negedge clk) begin
    cur_ready  = (cyc % 40) < 3;
    last_ready = (cyc % 40) < 3 || (cyc % 40) == 20;
  end

  always @(posedge clk) begin
    if (rst_n && dut.u_match.busy && (dut.u_match.full1 || dut.u_match.full2) &&
        dut.u_match.state == 3'd5)
      n_fifo_wait <= n_fifo_wait + 1;
  end

  always @(negedge clk) begin
    if (corner_valid) begin
      if (exp_corners.size() == 0) check(0, "corner beyond the model's list");
      else begin
        mcorner_t e;
        e = exp_corners.pop_front();
        check(longint'(corner.r) == e.r && int'(corner.x) == e.x && int'(corner.y) == e.y,
              $sformatf("corner (%0d,%0d) R=%0d, expected (%0d,%0d) R=%0d",
                        corner.x, corner.y, corner.r, e.x, e.y, e.r));
      end
    end
    if (cur_valid && cur_ready) begin
      if (exp_cur.size() == 0) check(0, "FIFO 1 entry beyond the model's list");
      else begin
        mcorner_t e;
        e = exp_cur.pop_front();
        check(int'(cur_xy.x) == e.x && int'(cur_xy.y) == e.y,
              $sformatf("FIFO 1 (%0d,%0d) expected (%0d,%0d)", cur_xy.x, cur_xy.y, e.x, e.y));
        n_matches++;
      end
    end
    if (last_valid && last_ready) begin
      if (exp_last.size() == 0) check(0, "FIFO 2 entry beyond the model's list");
      else begin
        mcorner_t e;
        e = exp_last.pop_front();
        check(int'(last_xy.x) == e.x && int'(last_xy.y) == e.y,
              $sformatf("FIFO 2 (%0d,%0d) expected (%0d,%0d)", last_xy.x, last_xy.y, e.x, e.y));
      end
    end
    if (img_valid) begin
      int idx;
      longint pv;
      idx = int'(img_y)*W + int'(img_x);
      pv = img[f_img][idx];
      check(img_data == 8'(pv) &&
            int'(img_x) == n_img % W && int'(img_y) == n_img / W, "image pass-through");
      n_img++;
      if (n_img == W*H) begin n_img = 0; f_img++; end
    end
  end

  // Per-frame counters, one clock after each match_done.
  always @(posedge clk) begin
    if (rst_n && dut.match_done) begin
      #1;
      check(int'(frame_corners) == exp_nstored[n_done] && int'(frame_matches) == exp_nmatch[n_done],
            $sformatf("frame %0d: stored %0d matched %0d, expected %0d %0d", n_done,
                      frame_corners, frame_matches, exp_nstored[n_done], exp_nmatch[n_done]));
      check(longint'(rmax_last) == rmax[n_done], $sformatf("frame %0d: Rmax %0d expected %0d",
                                                         n_done, rmax_last, rmax[n_done]));
      n_done++;
    end
  end

  // ---------------------------------------------------------- end
  initial begin
    wait (all_sent && n_done == NF && exp_cur.size() == 0 && exp_last.size() == 0);
    repeat (10) @(negedge clk);
    check(exp_corners.size() == 0, $sformatf("%0d corners never reported", exp_corners.size()));
    check(int'(dropped) == exp_drop, $sformatf("dropped %0d expected %0d", dropped, exp_drop));
    check(!cur_valid && !last_valid, "FIFOs empty at the end");
    check(f_img == NF, "all frames passed through");
    $display("mechanisms: input stall %0d, clear stall %0d, FIFO-full wait %0d, drops %0d, threshold rejects %0d, matches %0d",
             n_stall, n_clear_stall, n_fifo_wait, dropped, rejected, n_matches);
    for (int f = 0; f + 1 < NF; f++) begin
      int budget;
      budget = exp_nstored[f] * (((f == 0) ? 0 : exp_nstored[f-1]) + 3) + 64;
      $display("frame %0d: %0d clocks from first pixel to next frame, input stalled %0d (budget %0d)",
               f, start_cyc[f+1] - start_cyc[f], stall_f[f], budget);
      check(stall_f[f] > 0 && stall_f[f] <= budget, $sformatf("frame %0d stall %0d", f, stall_f[f]));
    end
    check(n_stall > 0, "input stall never happened");
    check(n_clear_stall > 0, "reset clear stall never happened");
    check(dropped > 0, "no corner was dropped");
    check(rejected > 0, "threshold never rejected a local maximum");
    check(n_matches > 0, "no match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
