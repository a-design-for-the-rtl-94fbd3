// tb_of_top_full: the end-to-end test of tb_of_top with every parameter at
// its default: 244 x 192 blocks, 24 upper and 6 lower iterations. Two
// blocks pass through the two-stage block pipeline (three steps), with the
// same checks as the reduced test except the clamp case.
module tb_of_top_full;
  import of_pkg::*;
  import of_tb_pkg::*;
  localparam int W = 244, H = 192, NB = 2;
  localparam int WU = W/2, HU = H/2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic [15:0] num_blocks;
  logic [COEF_W-1:0] alpha2 = 16'd64, lambda2 = 16'd16;
  logic up_pix_valid, up_pix_ready, up_prev_valid, up_prev_ready;
  logic lo_pix_valid, lo_pix_ready, lo_prev_valid, lo_prev_ready;
  pix3_t up_pix_data, lo_pix_data;
  flow2_t up_prev_flow, lo_prev_flow, out_flow;
  logic out_valid, up_busy, lo_busy, up_iterating, lo_iterating, mc_clamp;
  logic [15:0] out_blk;
  coord_t out_x, out_y;
  int checks = 0, failures = 0;

  // per-block motion and previous flow
  real tu [4] = '{1.0, 0.5, 0.5, 0.0};
  real tv [4] = '{-0.5, 1.0, 1.0, 3.5};
  bit  use_prev [4] = '{0, 0, 1, 0};

  real e2 [NB];
  int  nout [NB], order_err = 0, nclamp = 0, overlap = 0, cycles = 0;
  int  up_busy_cyc = 0, lo_busy_cyc = 0, up_iter_phases = 0, lo_iter_phases = 0;
  bit  bank_used [2];
  logic up_it_q = 0, lo_it_q = 0;
  int  ndone = 0;

  always @(negedge clk) begin
    if (busy) cycles++;
    if (up_busy) up_busy_cyc++;
    if (lo_busy) lo_busy_cyc++;
    if (up_busy && lo_busy) overlap++;
    if (mc_clamp) nclamp++;
    if (up_iterating && !up_it_q) up_iter_phases++;
    if (lo_iterating && !lo_it_q) lo_iter_phases++;
    up_it_q = up_iterating; lo_it_q = lo_iterating;
    if (out_valid) begin
      int b, x, y;
      real du, dv;
      b = int'(out_blk); x = int'(out_x); y = int'(out_y);
      if (b < NB) begin
        if (x != nout[b] % W || y != nout[b] / W) order_err++;
        nout[b]++;
        bank_used[b % 2] = 1;
        if (x >= 2 && x < W-2 && y >= 2 && y < H-2) begin
          du = from_flow(out_flow.u) - tu[b];
          dv = from_flow(out_flow.v) - tv[b];
          e2[b] += du*du + dv*dv;
        end
      end else order_err++;
    end
    if (done) ndone++;
  end

  initial begin
    #(64'd20_000_000_000) failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed_pix(bit upper);
    for (int b = 0; b < NB; b++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        pix3_t p = frames(x, y, 7*b, 5*b, tu[b], tv[b]);
        if (upper) begin
          up_pix_valid = 1; up_pix_data = p;
          @(posedge clk); while (!up_pix_ready) @(posedge clk);
          @(negedge clk); up_pix_valid = 0;
        end else begin
          lo_pix_valid = 1; lo_pix_data = p;
          @(posedge clk); while (!lo_pix_ready) @(posedge clk);
          @(negedge clk); lo_pix_valid = 0;
        end
      end
  endtask

  task automatic feed_prev(bit upper);
    for (int b = 0; b < NB; b++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        flow2_t f;
        f.u = use_prev[b] ? to_flow(tu[b]) : '0;
        f.v = use_prev[b] ? to_flow(tv[b]) : '0;
        if (upper) begin
          up_prev_valid = 1; up_prev_flow = f;
          @(posedge clk); while (!up_prev_ready) @(posedge clk);
          @(negedge clk); up_prev_valid = 0;
        end else begin
          lo_prev_valid = 1; lo_prev_flow = f;
          @(posedge clk); while (!lo_prev_ready) @(posedge clk);
          @(negedge clk); lo_prev_valid = 0;
        end
      end
  endtask

  initial begin
    rst_n = 0; start = 0; num_blocks = 16'(NB);
    up_pix_valid = 0; up_prev_valid = 0; lo_pix_valid = 0; lo_prev_valid = 0;
    up_pix_data = '0; lo_pix_data = '0; up_prev_flow = '0; lo_prev_flow = '0;
    for (int b = 0; b < NB; b++) begin e2[b] = 0.0; nout[b] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      feed_pix(1); feed_prev(1); feed_pix(0); feed_prev(0);
    join_none
    while (ndone == 0) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      real rms;
      rms = $sqrt(e2[b] / ((W-4)*(H-4)));
      $display("block %0d: motion (%f, %f) rms error %f px, outputs %0d", b, tu[b], tv[b], rms, nout[b]);
      checks++; if (nout[b] != W*H) failures++;
      if (b < 3) begin checks++; if (rms > 0.35) failures++; end
      e2[b] = rms;
    end
    if (NB > 2) begin checks++; if (e2[2] > e2[1] + 0.01) failures++; end
    checks++; if (order_err != 0) begin failures++; $display("order errors %0d", order_err); end
    $display("cycles %0d, upper busy %0d, lower busy %0d, overlap %0d, clamps %0d",
             cycles, up_busy_cyc, lo_busy_cyc, overlap, nclamp);
    $display("upper iteration phases %0d, lower iteration phases %0d", up_iter_phases, lo_iter_phases);
    checks++; if (overlap == 0) failures++;
    checks++; if (cycles >= up_busy_cyc + lo_busy_cyc) failures++;
    checks++; if (!bank_used[0] || !bank_used[1]) failures++;
    if (NB > 3) begin checks++; if (nclamp == 0) failures++; end
    checks++; if (up_iter_phases != NB || lo_iter_phases != NB) failures++;
    checks++; if (ndone != 1 || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  of_top dut (.*);
endmodule
