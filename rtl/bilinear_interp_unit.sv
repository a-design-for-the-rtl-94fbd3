// bilinear_interp_unit: bilinear interpolation unit with its memory.
//
// Holds the final upper-layer flow of a block (the bilinear interpolation
// memory, WU x HU words of (u,v)) and turns it into the propagation flow of
// the lower layer: the flow is up-sampled to lower-layer resolution by
// bilinear interpolation and doubled. Lower pixel (x,y) sits on upper pixel
// (x/2,y/2); odd coordinates take the mean of the two upper neighbours
// (clamped at the block edge). With four samples s00..s11 the result is
// 2 * mean = (s00+s01+s10+s11)/2, rounded toward minus infinity.
//
// The memory has two banks (this design's choice) so that the upper layer
// can write block n+1 while the lower layer still reads block n: this is
// what lets the two layers run as a two-stage block pipeline.
//
// Interface: wr_en/wr_bank/wr_x/wr_y/wr_flow store one upper-layer flow;
// each of the NQ query ports (q_bank, q_x, q_y in lower-layer coordinates)
// returns q_flow combinationally.
module bilinear_interp_unit
  import of_pkg::*;
#(
  parameter int WU = 122,
  parameter int HU = 96,
  parameter int NQ = 3
) (
  input  logic   clk,
  input  logic   wr_en,
  input  logic   wr_bank,
  input  coord_t wr_x,
  input  coord_t wr_y,
  input  flow2_t wr_flow,
  input  logic   q_bank [NQ],
  input  coord_t q_x    [NQ],
  input  coord_t q_y    [NQ],
  output flow2_t q_flow [NQ]
);

  flow2_t mem [2][WU*HU];

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_x) < WU && int'(wr_y) < HU)
      mem[wr_bank][int'(wr_y)*WU + int'(wr_x)] <= wr_flow;
  end

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_comb begin
    for (int k = 0; k < NQ; k++) begin
      int x0, x1, y0, y1;
      logic signed [FLOW_W+1:0] su, sv;
      flow2_t a, b, c, d;
      x0 = clampi(int'(q_x[k]) >> 1, 0, WU-1);
      y0 = clampi(int'(q_y[k]) >> 1, 0, HU-1);
      x1 = q_x[k][0] ? clampi(x0 + 1, 0, WU-1) : x0;
      y1 = q_y[k][0] ? clampi(y0 + 1, 0, HU-1) : y0;
      a = mem[q_bank[k]][y0*WU + x0];
      b = mem[q_bank[k]][y0*WU + x1];
      c = mem[q_bank[k]][y1*WU + x0];
      d = mem[q_bank[k]][y1*WU + x1];
      su = (FLOW_W+2)'(a.u) + (FLOW_W+2)'(b.u) + (FLOW_W+2)'(c.u) + (FLOW_W+2)'(d.u);
      sv = (FLOW_W+2)'(a.v) + (FLOW_W+2)'(b.v) + (FLOW_W+2)'(c.v) + (FLOW_W+2)'(d.v);
      q_flow[k].u = sat_flow(64'(su >>> 1));
      q_flow[k].v = sat_flow(64'(sv >>> 1));
    end
  end

endmodule
