// of_tb_pkg: test-pattern helpers shared by the layer and top testbenches.
// pattern() is a smooth sum of sinusoids (luminance 18..238); frames()
// gives the pixel of frames t-1, t, t+1 of that pattern translating by
// (u, v) pixels per frame, so the true optical flow is (u, v) everywhere.
package of_tb_pkg;
  import of_pkg::*;

  function automatic real pattern(real x, real y);
    real pi2 = 6.283185307179586;
    return 128.0 + 50.0 * $sin(pi2 * x / 17.0 + 0.3) + 40.0 * $sin(pi2 * y / 13.0 + 1.1)
         + 20.0 * $sin(pi2 * (x + y) / 23.0);
  endfunction

  function automatic pix_t to_pix(real r);
    int i = int'(r + 0.5);
    return pix_t'(i < 0 ? 0 : i > 255 ? 255 : i);
  endfunction

  // (ox, oy): position of the block in the frame
  function automatic pix3_t frames(int x, int y, int ox, int oy, real u, real v);
    pix3_t p;
    real fx = real'(x + ox), fy = real'(y + oy);
    p.prev = to_pix(pattern(fx + u, fy + v));
    p.cur  = to_pix(pattern(fx, fy));
    p.next = to_pix(pattern(fx - u, fy - v));
    return p;
  endfunction

  function automatic flow_val_t to_flow(real r);
    return flow_val_t'(int'(r * real'(1 << FLOW_F)));
  endfunction

  function automatic real from_flow(flow_val_t f);
    return real'(f) / real'(1 << FLOW_F);
  endfunction
endpackage
