// init_value_gen: initial value generation for the motion memory.
//
// The flow of the previous frame (the final, lowest-layer flow, read back
// from external memory) seeds the iteration, which speeds up convergence.
// In the UPPER mode the previous flow arrives at lower-layer resolution;
// the unit keeps every second pixel of every second row (sub-sampling) and
// halves it with a one-bit arithmetic shift. In the LOWER mode the
// iteration solves for a correction on top of the propagation flow, so this
// design seeds it with (previous flow - propagation flow), making the
// lower layer start from the previous frame's flow; that choice, and
// starting the luminance change xi at zero in both modes, are not fixed by
// the original description.
//
// Interface: start arms the unit for one W x H lower-layer raster stream
// (in_valid/in_ready/in_flow). prop_x/prop_y ask for the propagation flow
// of the current pixel, returned combinationally on prop_flow (LOWER mode).
// wr_en/wr_addr/wr_data is registered, one cycle after the beat. done pulses
// with the last write.
module init_value_gen
  import of_pkg::*;
#(
  parameter bit UPPER = 1'b1,
  parameter int W = 244,           // width of the incoming (lower) raster
  parameter int H = 192,
  localparam int OW = UPPER ? W/2 : W,
  localparam int OH = UPPER ? H/2 : H,
  localparam int AW = $clog2(OW*OH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           in_valid,
  output logic           in_ready,
  input  flow2_t         in_flow,
  output coord_t         prop_x,
  output coord_t         prop_y,
  input  flow2_t         prop_flow,
  output logic           wr_en,
  output logic [AW-1:0]  wr_addr,
  output flow3_t         wr_data,
  output logic           done
);

  logic active;
  int   x, y;
  logic beat;

  assign in_ready = active;
  assign beat     = active && in_valid;
  assign prop_x   = coord_t'(x);
  assign prop_y   = coord_t'(y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      x <= 0; y <= 0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      done    <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      done  <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        x <= 0; y <= 0;
      end else if (beat) begin
        if (UPPER) begin
          if (x[0] == 1'b0 && y[0] == 1'b0) begin
            wr_en      <= 1'b1;
            wr_addr    <= AW'((y/2)*OW + x/2);
            wr_data.u  <= in_flow.u >>> 1;
            wr_data.v  <= in_flow.v >>> 1;
            wr_data.xi <= '0;
          end
        end else begin
          wr_en      <= 1'b1;
          wr_addr    <= AW'(y*OW + x);
          wr_data.u  <= sat_flow(64'(in_flow.u) - 64'(prop_flow.u));
          wr_data.v  <= sat_flow(64'(in_flow.v) - 64'(prop_flow.v));
          wr_data.xi <= '0;
        end
        if (x == W-1) begin
          x <= 0;
          if (y == H-1) begin
            y      <= 0;
            active <= 1'b0;
            done   <= 1'b1;
          end else y <= y + 1;
        end else x <= x + 1;
      end
    end
  end

endmodule
