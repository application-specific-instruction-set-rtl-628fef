// tb_pkg: test-image generator shared by the testbenches.
//
// cur_px(x, y) is a deterministic pseudo-random luminance pattern for the
// current frame. ref_px(x, y) is the reference frame: the current frame moved
// by (MOT_X, MOT_Y) plus a little noise, so that a block at (x, y) of the
// current frame best matches the reference block at (x + MOT_X, y + MOT_Y).
// cur_sm / ref_sm are the same with a smooth image (bilinear interpolation of
// random values on an 8-pixel grid), on which fast searches that follow the
// SAD gradient can reach the true motion.
package tb_pkg;

  localparam int MOT_X = 3;
  localparam int MOT_Y = -2;

  function automatic int unsigned hash2(input int x, input int y);
    int unsigned h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return h ^ (h >> 16);
  endfunction

  function automatic logic [7:0] cur_px(input int x, input int y);
    return 8'(hash2(x, y) & 255);
  endfunction

  function automatic logic [7:0] ref_px(input int x, input int y);
    int v;
    v = int'(cur_px(x - MOT_X, y - MOT_Y)) + int'(hash2(y + 1000, x) % 5) - 2;
    if (v < 0)   v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  function automatic logic [7:0] smooth_px(input int x, input int y);
    int xx, yy, gx, gy, fx, fy, h00, h10, h01, h11;
    xx = x + 256; yy = y + 256;
    gx = xx / 8; gy = yy / 8; fx = xx % 8; fy = yy % 8;
    h00 = int'(hash2(gx, gy) & 255);     h10 = int'(hash2(gx + 1, gy) & 255);
    h01 = int'(hash2(gx, gy + 1) & 255); h11 = int'(hash2(gx + 1, gy + 1) & 255);
    return 8'((h00 * (8 - fx) * (8 - fy) + h10 * fx * (8 - fy) +
               h01 * (8 - fx) * fy + h11 * fx * fy) / 64);
  endfunction

  function automatic logic [7:0] cur_sm(input int x, input int y);
    return smooth_px(x, y);
  endfunction

  function automatic logic [7:0] ref_sm(input int x, input int y);
    int v;
    v = int'(smooth_px(x - MOT_X, y - MOT_Y)) + int'(hash2(y + 1000, x) % 5) - 2;
    if (v < 0)   v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

endpackage
