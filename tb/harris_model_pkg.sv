// harris_model_pkg: reference model of the whole corner pipeline, used by the
// end-to-end testbenches. It recomputes each stage on whole frames held as
// flat arrays (index y*W + x) in the stream coordinates of the hardware: a
// K x K stage's output at (x, y) is its kernel over the input rows y-K+1..y
// and columns x-K+1..x, or zero when x or y is below K-1. The model then
// applies the suppression rule with the previous frame's Rmax, truncates the
// corner list to the RAM size and matches by equal R, first record wins.
// It also generates the test images.
package harris_model_pkg;

  typedef longint plane_t [];

  typedef struct {
    longint r;
    int     x;
    int     y;
  } mcorner_t;

  typedef mcorner_t clist_t [$];

  function automatic plane_t lp5(input plane_t in, input int W, input int H);
    plane_t o = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        longint s;
        if (x < 4 || y < 4) begin o[y*W+x] = 0; continue; end
        s = in[(y-4)*W + x-2] +
            in[(y-3)*W + x-3] + in[(y-3)*W + x-2] + in[(y-3)*W + x-1] +
            in[(y-2)*W + x-4] + in[(y-2)*W + x-3] + 4*in[(y-2)*W + x-2] +
            in[(y-2)*W + x-1] + in[(y-2)*W + x] +
            in[(y-1)*W + x-3] + in[(y-1)*W + x-2] + in[(y-1)*W + x-1] +
            in[y*W + x-2];
        o[y*W+x] = s >>> 4;
      end
    return o;
  endfunction

  function automatic void sobel(input plane_t in, input int W, input int H,
                                output plane_t ix, output plane_t iy);
    ix = new[W*H];
    iy = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (x < 2 || y < 2) begin ix[y*W+x] = 0; iy[y*W+x] = 0; continue; end
        ix[y*W+x] = (in[(y-2)*W+x] - in[(y-2)*W+x-2]) + 2*(in[(y-1)*W+x] - in[(y-1)*W+x-2]) +
                    (in[y*W+x] - in[y*W+x-2]);
        iy[y*W+x] = (in[(y-2)*W+x-2] - in[y*W+x-2]) + 2*(in[(y-2)*W+x-1] - in[y*W+x-1]) +
                    (in[(y-2)*W+x] - in[y*W+x]);
      end
  endfunction

  // Response plane of one frame.
  function automatic plane_t response(input plane_t img, input int W, input int H, input int ash);
    plane_t pf, ix, iy, pxx, pyy, pxy, a, b, c, r;
    pf = lp5(img, W, H);
    sobel(pf, W, H, ix, iy);
    pxx = new[W*H]; pyy = new[W*H]; pxy = new[W*H]; r = new[W*H];
    for (int k = 0; k < W*H; k++) begin
      pxx[k] = ix[k]*ix[k]; pyy[k] = iy[k]*iy[k]; pxy[k] = ix[k]*iy[k];
    end
    a = lp5(pxx, W, H); b = lp5(pyy, W, H); c = lp5(pxy, W, H);
    for (int k = 0; k < W*H; k++)
      r[k] = a[k]*b[k] - c[k]*c[k] - (((a[k]+b[k])*(a[k]+b[k])) >>> ash);
    return r;
  endfunction

  function automatic longint plane_max(input plane_t r);
    longint m = r[0];
    foreach (r[k]) if (r[k] > m) m = r[k];
    return m;
  endfunction

  // Corners of one frame in stream order, image coordinates. rejected counts
  // local maxima that only the Rmax/64 threshold removed.
  function automatic clist_t corners(input plane_t r, input int W, input int H,
                                     input longint rmax_prev, output int rejected);
    clist_t l;
    longint thr = rmax_prev >>> 6;
    rejected = 0;
    for (int y = 2; y < H; y++)
      for (int x = 2; x < W; x++) begin
        longint cv = r[(y-1)*W + x-1];
        bit mx = 1;
        for (int dy = -2; dy <= 0; dy++)
          for (int dx = -2; dx <= 0; dx++)
            if (!(dy == -1 && dx == -1) && !(cv > r[(y+dy)*W + x+dx])) mx = 0;
        if (mx && cv > thr) l.push_back('{r: cv, x: x - 6, y: y - 6});
        else if (mx && cv > 0) rejected++;
      end
    return l;
  endfunction

  // Matches of the stored current list against the stored last list.
  function automatic void match(input clist_t cur, input clist_t last,
                                output clist_t mcur, output clist_t mlast);
    mcur.delete(); mlast.delete();
    foreach (cur[i])
      foreach (last[j])
        if (cur[i].r == last[j].r) begin
          mcur.push_back(cur[i]); mlast.push_back(last[j]);
          break;
        end
  endfunction

  // Test scene: rectangles, a step and a triangle of different grey levels,
  // placed relative to the frame size and moved by (dx, dy).
  function automatic plane_t scene(input int W, input int H, input int dx, input int dy);
    plane_t p = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int u = x - dx, v = y - dy;
        int g = 40;
        if (u >= W*2/8  && u < W*4/8  && v >= H*2/8 && v < H*4/8) g = 200;
        if (u >= W*5/8  && u < W*6/8  && v >= H*2/8 && v < H*3/8 + 3) g = 120;
        if (u >= W*3/8  && u < W*5/8  && v >= H*5/8 && v < H*6/8 + 1) g = 170;
        if (u >= W*9/16 && v >= H*7/16 && v < H*9/16 && (u - W*9/16) < (v - H*7/16) + 2) g = 240;
        if (u >= W*1/8  && u < W*2/8 + 1 && v >= H*5/8 && v < H*7/8) g = 90;
        p[y*W+x] = g;
      end
    return p;
  endfunction

  function automatic plane_t noise(input int W, input int H);
    plane_t p = new[W*H];
    foreach (p[k]) p[k] = longint'($urandom_range(0, 255));
    return p;
  endfunction

endpackage
