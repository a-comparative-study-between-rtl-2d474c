// tb_golden_pkg: reference computations for the image testbenches, written
// in plain image coordinates (row cy, column cx, row-major image array of
// width w) and independent of how the hardware orders its window.
package tb_golden_pkg;
  typedef int img_t[];

  function automatic int px(const ref img_t img, input int w, input int x, input int y);
    return img[y*w + x];
  endfunction

  // |Gx| + |Gy| with the standard Sobel masks, saturated to maxv
  function automatic int sobel_ref(const ref img_t img, input int w, input int cx,
                                   input int cy, input int maxv);
    int gx, gy, s;
    gx = (px(img,w,cx+1,cy-1) + 2*px(img,w,cx+1,cy) + px(img,w,cx+1,cy+1))
       - (px(img,w,cx-1,cy-1) + 2*px(img,w,cx-1,cy) + px(img,w,cx-1,cy+1));
    gy = (px(img,w,cx-1,cy-1) + 2*px(img,w,cx,cy-1) + px(img,w,cx+1,cy-1))
       - (px(img,w,cx-1,cy+1) + 2*px(img,w,cx,cy+1) + px(img,w,cx+1,cy+1));
    s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return s > maxv ? maxv : s;
  endfunction

  // Gaussian [1 2 1;2 4 2;1 2 1]/16 with every term divided (floored) first
  function automatic int gauss_ref(const ref img_t img, input int w, input int cx, input int cy);
    int s = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int sh;
        sh = (dx == 0 && dy == 0) ? 2 : ((dx == 0 || dy == 0) ? 3 : 4);
        s += px(img,w,cx+dx,cy+dy) >> sh;
      end
    return s;
  endfunction

  // exact rounded-down Gaussian, for the accuracy bound
  function automatic int gauss_exact(const ref img_t img, input int w, input int cx, input int cy);
    int s = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int k;
        k = (dx == 0 && dy == 0) ? 4 : ((dx == 0 || dy == 0) ? 2 : 1);
        s += k * px(img,w,cx+dx,cy+dy);
      end
    return s / 16;
  endfunction

  // cross-shaped dilation (OR) or erosion (AND) of a binary image
  function automatic int cross_ref(const ref img_t img, input int w, input int cx,
                                   input int cy, input bit is_dilation);
    int v[5];
    v[0] = px(img,w,cx,cy-1); v[1] = px(img,w,cx-1,cy); v[2] = px(img,w,cx,cy);
    v[3] = px(img,w,cx+1,cy); v[4] = px(img,w,cx,cy+1);
    if (is_dilation) return (v[0] | v[1] | v[2] | v[3] | v[4]) & 1;
    else             return (v[0] & v[1] & v[2] & v[3] & v[4]) & 1;
  endfunction
endpackage
