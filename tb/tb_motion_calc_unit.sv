// tb_motion_calc_unit: self-checking test of the SOR Gauss-Seidel solver.
// The testbench holds the gradient and motion memories (combinational
// reads, writes on the clock edge) and fills them with random gradients and
// flows, and feeds the first sweep as a raster gradient stream (without
// gaps in the first run, with random gaps in the second). An independent
// reference model runs the same sweeps as a plain in-place Gauss-Seidel
// loop: diagonal averages (mirrored at the borders) read the array as it is
// being overwritten, so the row above holds this sweep's values and the row
// below the previous sweep's. N/D has 8 extra fraction bits and the SOR step
// uses w = 1.75. After NITER sweeps every word of the motion memory is
// compared; the number of writes, the writes flagged as final, the write
// order, and the cycle count (one pixel per cycle after the stream, plus
// the 12-cycle pipeline) are checked too.
module tb_motion_calc_unit;
  import of_pkg::*;
  localparam int W = 16, H = 6, NITER = 3, LAT = 12, AW = $clog2(W*H);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, wr_en, wr_last;
  logic [COEF_W-1:0] alpha2, lambda2;
  logic [AW-1:0] g_addr, wr_addr;
  logic [AW-1:0] m_addr [5];
  grad_t g_data;
  flow3_t m_data [5];
  flow3_t wr_data;
  coord_t wr_x, wr_y;
  logic   s_valid;
  coord_t s_x, s_y;
  grad_t  s_grad;
  int checks = 0, failures = 0;

  grad_t  gmem [W*H];
  flow3_t mmem [W*H];
  longint ru [H][W], rv [H][W], rx [H][W];   // reference state

  assign g_data = gmem[g_addr];
  always_comb for (int k = 0; k < 5; k++) m_data[k] = mmem[m_addr[k]];
  always @(posedge clk) if (wr_en) mmem[wr_addr] <= wr_data;

  motion_calc_unit #(.W(W), .H(H), .NITER(NITER), .LAT(LAT)) dut (.*);

  int cyc = 0,  nwr = 0, nlast = 0, order_err = 0, start_cyc = 0, done_cyc = 0, beat_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_valid) beat_cyc <= cyc;
    if (wr_en) begin
      if (int'(wr_addr) != nwr % (W*H) || int'(wr_x) != (nwr % (W*H)) % W) order_err++;
      nwr++;
      if (wr_last) nlast++;
    end
  end

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mir(int v, int n);    // mirrored border
    return v < 0 ? 1 : v >= n ? n - 2 : v;
  endfunction
  function automatic longint fl_sat(longint x);
    longint mx = (64'sd1 <<< (FLOW_W-1)) - 1;
    return x > mx ? mx : x < -mx-1 ? -mx-1 : x;
  endfunction
  function automatic longint fdiv4(longint s);   // floor(s/4)
    return (s >= 0) ? s / 4 : -((-s + 3) / 4);
  endfunction

  task automatic ref_sweeps(longint a2, longint l2);
    for (int it = 0; it < NITER; it++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int xl, xr, yu, yd;
          longint su, sv, sx, au, av, ax, n, d, q, cu, cv, cx, ix, iy, itv, du, dv, dx;
          grad_t g;
          xl = mir(x-1, W); xr = mir(x+1, W); yu = mir(y-1, H); yd = mir(y+1, H);
          g = gmem[y*W + x];
          su = ru[yu][xl] + ru[yu][xr] + ru[yd][xl] + ru[yd][xr];
          sv = rv[yu][xl] + rv[yu][xr] + rv[yd][xl] + rv[yd][xr];
          sx = rx[yu][xl] + rx[yu][xr] + rx[yd][xl] + rx[yd][xr];
          au = fdiv4(su); av = fdiv4(sv); ax = fdiv4(sx);
          ix = g.ix; iy = g.iy; itv = g.it;
          n = ix*au + iy*av + itv*(1 << FLOW_F) + ax*(1 << GRAD_F);
          d = ix*ix + iy*iy + a2 + l2;
          q = (n * 256) / d;                       // truncating division
          cu = (ix * q) >>> 8; cv = (iy * q) >>> 8; cx = (l2 * q) >>> (8 + GRAD_F);
          du = au - cu - ru[y][x]; dv = av - cv - rv[y][x]; dx = ax - cx - rx[y][x];
          ru[y][x] = fl_sat(ru[y][x] + 2*du - (du >>> 2));
          rv[y][x] = fl_sat(rv[y][x] + 2*dv - (dv >>> 2));
          rx[y][x] = fl_sat(rx[y][x] + 2*dx - (dx >>> 2));
        end
  endtask

  initial begin
    rst_n = 0; start = 0; s_valid = 0; s_x = '0; s_y = '0; s_grad = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      alpha2  = (run == 0) ? 16'd64 : 16'd400;
      lambda2 = (run == 0) ? 16'd16 : 16'd100;
      for (int i = 0; i < W*H; i++) begin
        gmem[i].ix = grad_val_t'($signed($urandom % 801) - 400);
        gmem[i].iy = grad_val_t'($signed($urandom % 801) - 400);
        gmem[i].it = grad_val_t'($signed($urandom % 401) - 200);
        mmem[i].u  = flow_val_t'($signed($urandom % 257) - 128);
        mmem[i].v  = flow_val_t'($signed($urandom % 257) - 128);
        mmem[i].xi = flow_val_t'($signed($urandom % 129) - 64);
        ru[i / W][i % W] = mmem[i].u; rv[i / W][i % W] = mmem[i].v; rx[i / W][i % W] = mmem[i].xi;
      end
      ref_sweeps(longint'(alpha2), longint'(lambda2));
      nwr = 0; nlast = 0; order_err = 0;
      @(negedge clk); start = 1; start_cyc = cyc; @(negedge clk); start = 0;
      for (int i = 0; i < W*H; i++) begin      // first sweep: gradient stream
        if (run == 1) while ($urandom % 3 == 0) begin
          s_valid = 0; @(negedge clk);
        end
        s_valid = 1; s_x = coord_t'(i % W); s_y = coord_t'(i / W); s_grad = gmem[i];
        @(negedge clk);
      end
      s_valid = 0;
      @(posedge done); done_cyc = cyc; @(negedge clk);
      for (int i = 0; i < W*H; i++) begin
        checks++;
        if (longint'(mmem[i].u) != ru[i/W][i%W] || longint'(mmem[i].v) != rv[i/W][i%W]
            || longint'(mmem[i].xi) != rx[i/W][i%W]) begin
          failures++;
          if (failures < 5) $display("pixel %0d: got %0d %0d %0d exp %0d %0d %0d", i,
             mmem[i].u, mmem[i].v, mmem[i].xi, ru[i/W][i%W], rv[i/W][i%W], rx[i/W][i%W]);
        end
      end
      checks++; if (nwr != NITER*W*H) begin failures++; $display("writes %0d", nwr); end
      checks++; if (nlast != W*H) failures++;
      checks++; if (order_err != 0) failures++;
      checks++;
      if (done_cyc - beat_cyc != (NITER-1)*W*H + LAT + 1) begin
        failures++; $display("cycles after stream %0d", done_cyc - beat_cyc);
      end
      if (run == 0) begin
        checks++;
        if (done_cyc - start_cyc != NITER*W*H + LAT + 1) begin
          failures++; $display("cycles %0d", done_cyc - start_cyc);
        end
      end
      checks++; if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
