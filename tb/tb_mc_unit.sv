// tb_mc_unit: self-checking test of the motion compensation unit.
// Streams two random 16 x 12 blocks of frames t-1, t, t+1 (the second with
// input gaps) while answering the unit's propagation-flow queries with a
// fixed pattern of sub-pixel flows up to +-4 pixels vertically. A reference
// computes CF (t-1 sampled at p - flow) and CB (t+1 sampled at p + flow)
// by bilinear interpolation, with the vertical displacement limited to
// [-3, 3) pixels and positions clamped into the block. Checks every output,
// its order, the count, done, that clamping occurred, and that the first
// output follows the first pixel of the fifth row by one cycle.
module tb_mc_unit;
  import of_pkg::*;
  localparam int W = 16, H = 12, ONE = 1 << FLOW_F;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, in_valid, in_ready, clamp_hit, out_valid, done;
  pix3_t in_pix, out_pix;
  coord_t q_x, q_y, out_x, out_y;
  flow2_t q_flow;
  int checks = 0, failures = 0;
  pix3_t img [H][W];
  int cyc = 0, nbeat = 0, beat_cyc, first_cyc, nout, ndone, nclamp = 0, ex, ey;
  always @(posedge clk) cyc++;

  function automatic int fu(int x, int y); return ((x*37 + y*11) % 401) - 200; endfunction
  function automatic int fv(int x, int y); return ((x*13 + y*29) % 513) - 256; endfunction
  assign q_flow.u = flow_val_t'(fu(int'(q_x), int'(q_y)));
  assign q_flow.v = flow_val_t'(fv(int'(q_x), int'(q_y)));

  mc_unit #(.W(W), .H(H)) dut (.*);

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  function automatic int fdiv(int a, int b);   // floor division, b > 0
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int sample(int frame, int x, int y, int sgn);
    int dx = sgn * fu(x, y), dy = cl(sgn * fv(x, y), -3*ONE, 3*ONE - 1);
    int px = cl(x*ONE + dx, 0, (W-1)*ONE), py = cl(y*ONE + dy, 0, (H-1)*ONE);
    int x0 = fdiv(px, ONE), y0 = fdiv(py, ONE);
    int ax = px - x0*ONE, ay = py - y0*ONE;
    int x1 = x0 + 1 > W-1 ? W-1 : x0 + 1, y1 = y0 + 1 > H-1 ? H-1 : y0 + 1;
    int p00, p01, p10, p11, acc;
    p00 = frame == 0 ? img[y0][x0].prev : img[y0][x0].next;
    p01 = frame == 0 ? img[y0][x1].prev : img[y0][x1].next;
    p10 = frame == 0 ? img[y1][x0].prev : img[y1][x0].next;
    p11 = frame == 0 ? img[y1][x1].prev : img[y1][x1].next;
    acc = p00*(ONE-ax)*(ONE-ay) + p01*ax*(ONE-ay) + p10*(ONE-ax)*ay + p11*ax*ay;
    return (acc + ONE*ONE/2) / (ONE*ONE);
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      int cf, cb;
      if (first_cyc < 0) first_cyc = cyc;
      cf = sample(0, int'(out_x), int'(out_y), -1);
      cb = sample(1, int'(out_x), int'(out_y), +1);
      checks++;
      if (int'(out_pix.prev) != cf || int'(out_pix.next) != cb ||
          out_pix.cur != img[out_y][out_x].cur || int'(out_x) != ex || int'(out_y) != ey) begin
        failures++;
        if (failures < 5) $display("(%0d,%0d) got %0d %0d exp %0d %0d", out_x, out_y,
                                   out_pix.prev, out_pix.next, cf, cb);
      end
      nout++;
      ex++; if (ex == W) begin ex = 0; ey++; end
    end
    if (clamp_hit) nclamp++;
    if (done) ndone++;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0; in_pix = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int blk = 0; blk < 2; blk++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix3_t'($urandom);
      nout = 0; ndone = 0; ex = 0; ey = 0; first_cyc = -1; nbeat = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        if (blk == 1) while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pix = img[y][x];
        if (nbeat == 4*W) beat_cyc = cyc + 1;    // first pixel of the fifth row
        @(posedge clk); while (!in_ready) @(posedge clk);
        nbeat++;
        @(negedge clk);
      end
      in_valid = 0;
      while (ndone == 0) @(negedge clk);
      repeat (2) @(negedge clk);
      checks++; if (nout != W*H) begin failures++; $display("count %0d", nout); end
      checks++; if (ndone != 1) failures++;
      checks++; if (first_cyc != beat_cyc) begin failures++; $display("first %0d beat %0d", first_cyc, beat_cyc); end
    end
    checks++; if (nclamp == 0) failures++;
    $display("vertical clamps: %0d", nclamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
