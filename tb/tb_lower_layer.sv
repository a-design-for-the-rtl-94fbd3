// tb_lower_layer: end-to-end test of the lower layer module on a 32 x 24
// block of a smooth translating pattern. The testbench answers the
// propagation-flow queries with a constant flow P, as the bilinear unit
// would for a uniform upper-layer result, and feeds P as previous flow too.
//   run 0: motion (1.0, -0.5), P exact: the output must stay near the motion.
//   run 1: motion (1.5, -0.5), P = (1.0, -0.5): the iteration must supply
//          the missing correction of 0.5 pixel.
//   run 2: P = (0, 4) beyond the motion compensation reach: the vertical
//          clamp must act, and the block must still finish.
// Checks count, raster order and timing of the final-flow output (only in
// the last sweep), done, and the rms error in the interior of the block.
module tb_lower_layer;
  import of_pkg::*;
  import of_tb_pkg::*;
  localparam int W = 32, H = 24, NITER = 6, LAT = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, pix_valid, pix_ready, prev_valid, prev_ready;
  logic out_valid, mc_clamp, busy, iterating, done;
  logic [COEF_W-1:0] alpha2 = 16'd64, lambda2 = 16'd16;
  pix3_t pix_data;
  flow2_t prev_flow, out_flow;
  coord_t q_x [3], q_y [3], out_x, out_y;
  flow2_t q_flow [3];
  flow2_t pflow;
  int checks = 0, failures = 0;
  real fu [H][W], fv [H][W];
  int nout, order_err, ndone, nclamp;
  real tu, tv, pu, pv;

  always_comb for (int k = 0; k < 3; k++) q_flow[k] = pflow;

  lower_layer #(.W(W), .H(H), .NITER(NITER), .LAT(LAT)) dut (.*);

  initial begin
    #50000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      if (int'(out_x) != nout % W || int'(out_y) != nout / W) order_err++;
      fu[out_y][out_x] = from_flow(out_flow.u);
      fv[out_y][out_x] = from_flow(out_flow.v);
      nout++;
    end
    if (mc_clamp) nclamp++;
    if (done) ndone++;
  end

  initial begin
    rst_n = 0; start = 0; pix_valid = 0; prev_valid = 0; pix_data = '0; prev_flow = '0;
    pflow = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      tu = (run == 1) ? 1.5 : 1.0; tv = -0.5;
      pu = (run == 2) ? 0.0 : 1.0; pv = (run == 2) ? 4.0 : -0.5;
      pflow.u = to_flow(pu); pflow.v = to_flow(pv);
      nout = 0; order_err = 0; ndone = 0; nclamp = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      fork
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
          pix_valid = 1; pix_data = frames(x, y, 5, 3, tu, tv);
          @(posedge clk); while (!pix_ready) @(posedge clk);
          @(negedge clk); pix_valid = 0;
        end
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
          prev_valid = 1; prev_flow = pflow;
          @(posedge clk); while (!prev_ready) @(posedge clk);
          @(negedge clk); prev_valid = 0;
        end
      join
      while (ndone == 0) @(negedge clk);
      begin
        real e = 0.0;
        int n = 0;
        for (int y = 2; y < H-2; y++) for (int x = 2; x < W-2; x++) begin
          e += (fu[y][x] - tu) * (fu[y][x] - tu) + (fv[y][x] - tv) * (fv[y][x] - tv);
          n++;
        end
        e = $sqrt(e / n);
        $display("run %0d: rms error %f px, centre (%f, %f), clamps %0d", run, e,
                 fu[H/2][W/2], fv[H/2][W/2], nclamp);
        if (run < 2) begin checks++; if (e > 0.3) failures++; end
      end
      checks++; if (nout != W*H || order_err != 0) begin failures++; $display("outputs %0d order %0d", nout, order_err); end
      checks++; if (ndone != 1 || busy) failures++;
      checks++; if ((run == 2) != (nclamp > 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
