// div_runner: testbench helper that processes one frame with the optical
// flow processor by the image division method.
//
// The frame (FW x FH) is cut into NB blocks of W x FH pixels whose left
// edges lie STEPX pixels apart, so neighbouring blocks overlap by
// W - STEPX pixels (none when STEPX = W). The helper plays the external
// memory: it streams the three frames of a diverging test scene (zoom
// about the frame centre, true flow (S*(x-cx), S*(y-cy))) and a zero
// previous flow into both layers, and builds the final flow of the frame by
// cutting each block in the middle of its overlap, as the external address
// generator would. fu/fv hold the result in pixels; finished goes high after
// the processor's done, nout counts the flow outputs.
module div_runner
  import of_pkg::*;
  import of_tb_pkg::*;
#(
  parameter int  FW = 80,
  parameter int  FH = 24,
  parameter int  W = 48,
  parameter int  NB = 2,
  parameter int  STEPX = 32,
  parameter real S = 0.02
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   nout
);
  localparam int H = FH;
  localparam int OVH = (W - STEPX) / 2;   // half overlap: where blocks are cut

  logic start, busy, done;
  logic [15:0] num_blocks;
  logic [COEF_W-1:0] alpha2, lambda2;
  logic up_pix_valid, up_pix_ready, up_prev_valid, up_prev_ready;
  logic lo_pix_valid, lo_pix_ready, lo_prev_valid, lo_prev_ready;
  pix3_t up_pix_data, lo_pix_data;
  flow2_t up_prev_flow, lo_prev_flow, out_flow;
  logic out_valid, up_busy, lo_busy, up_iterating, lo_iterating, mc_clamp;
  logic [15:0] out_blk;
  coord_t out_x, out_y;

  real fu [FH][FW], fv [FH][FW];

  of_top #(.W(W), .H(H)) u_proc (.*);

  function automatic real true_u(int x);
    return S * (real'(x) - real'(FW - 1) / 2.0);
  endfunction
  function automatic real true_v(int y);
    return S * (real'(y) - real'(FH - 1) / 2.0);
  endfunction

  // frames t-1, t, t+1 of the zooming scene at frame position (x, y)
  function automatic pix3_t scene(int x, int y);
    pix3_t p;
    real fx, fy, u, v;
    fx = real'(x); fy = real'(y); u = true_u(x); v = true_v(y);
    p.prev = to_pix(pattern(fx + u, fy + v));
    p.cur  = to_pix(pattern(fx, fy));
    p.next = to_pix(pattern(fx - u, fy - v));
    return p;
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      int b, fx, lo, hi;
      b  = int'(out_blk);
      fx = b * STEPX + int'(out_x);
      lo = (b == 0)    ? 0      : b * STEPX + OVH;
      hi = (b == NB-1) ? FW - 1 : (b + 1) * STEPX + OVH - 1;
      nout++;
      if (fx >= lo && fx <= hi) begin
        fu[out_y][fx] = from_flow(out_flow.u);
        fv[out_y][fx] = from_flow(out_flow.v);
      end
    end
    if (done) finished = 1'b1;
  end

  task automatic feed_pix(bit upper);
    for (int b = 0; b < NB; b++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        pix3_t p;
        p = scene(b * STEPX + x, y);
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
        if (upper) begin
          up_prev_valid = 1; up_prev_flow = '0;
          @(posedge clk); while (!up_prev_ready) @(posedge clk);
          @(negedge clk); up_prev_valid = 0;
        end else begin
          lo_prev_valid = 1; lo_prev_flow = '0;
          @(posedge clk); while (!lo_prev_ready) @(posedge clk);
          @(negedge clk); lo_prev_valid = 0;
        end
      end
  endtask

  initial begin
    finished = 1'b0; nout = 0; start = 1'b0;
    num_blocks = 16'(NB); alpha2 = 16'd64; lambda2 = 16'd16;
    up_pix_valid = 0; lo_pix_valid = 0; up_prev_valid = 0; lo_prev_valid = 0;
    up_pix_data = '0; lo_pix_data = '0; up_prev_flow = '0; lo_prev_flow = '0;
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++) begin
      fu[y][x] = 0.0; fv[y][x] = 0.0;
    end
    wait (rst_n && go);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      feed_pix(1); feed_prev(1); feed_pix(0); feed_prev(0);
    join_none
  end
endmodule
