// tb_ref_pkg: independent reference models used by the testbenches.
// sobel_edges() computes the 64-bit edge map of an 8x8 block (bit i = pixel
// i in raster order) straight from the definition: zero padding outside the
// block, |Gx| + |Gy| > threshold.
package tb_ref_pkg;
  typedef logic [7:0] blk_t [64];

  function automatic int px(const ref blk_t b, input int r, input int c);
    if (r < 0 || r > 7 || c < 0 || c > 7) return 0;
    return int'(b[r*8+c]);
  endfunction

  function automatic logic [63:0] sobel_edges(const ref blk_t b, input int thr);
    logic [63:0] e;
    int gx, gy;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        gx = -px(b,r-1,c-1) + px(b,r-1,c+1) - 2*px(b,r,c-1) + 2*px(b,r,c+1)
             - px(b,r+1,c-1) + px(b,r+1,c+1);
        gy = -px(b,r-1,c-1) - 2*px(b,r-1,c) - px(b,r-1,c+1)
             + px(b,r+1,c-1) + 2*px(b,r+1,c) + px(b,r+1,c+1);
        if (gx < 0) gx = -gx;
        if (gy < 0) gy = -gy;
        e[r*8+c] = (gx + gy) > thr;
      end
    return e;
  endfunction

  function automatic int popcount64(input logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  // A test block: a bright rectangle at (r0,c0) of size h x w on a dark,
  // slightly noisy background; seed varies the noise.
  function automatic void make_block(ref blk_t b, input int r0, input int c0,
                                     input int h, input int w, input int seed);
    for (int i = 0; i < 64; i++) begin
      int r = i / 8, c = i % 8;
      int v = 20 + ((i * 7 + seed * 13) % 5);
      if (r >= r0 && r < r0 + h && c >= c0 && c < c0 + w) v = 200 + (seed % 30);
      b[i] = 8'(v);
    end
  endfunction
endpackage
