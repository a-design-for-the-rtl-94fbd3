// of_pkg: shared widths, fixed-point formats and data types of the optical
// flow processor.
//
// Number formats (this design's choice; the word lengths of the original
// processor are not published):
//   pixels     : unsigned 8-bit luminance.
//   gradients  : signed GRAD_W bits with GRAD_F fractional bits (Ix, Iy, It).
//   flow/xi    : signed FLOW_W bits with FLOW_F fractional bits (u, v, xi).
//   alpha^2, lambda^2 : unsigned COEF_W bits with 2*GRAD_F fractional bits,
//                       i.e. in the same units as Ix^2.
package of_pkg;

  localparam int PIX_W  = 8;
  localparam int GRAD_W = 12;
  localparam int GRAD_F = 2;
  localparam int FLOW_W = 16;
  localparam int FLOW_F = 6;
  localparam int COEF_W = 16;
  localparam int COORD_W = 10;   // enough for 1024 columns or rows

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic signed [GRAD_W-1:0]  grad_val_t;
  typedef logic signed [FLOW_W-1:0]  flow_val_t;
  typedef logic [COORD_W-1:0]        coord_t;

  // One pixel position of the three frames t-1, t, t+1 (or CF, t, CB).
  typedef struct packed {
    pix_t prev;
    pix_t cur;
    pix_t next;
  } pix3_t;

  // Spatial and temporal luminance gradients of one pixel.
  typedef struct packed {
    grad_val_t ix;
    grad_val_t iy;
    grad_val_t it;
  } grad_t;

  // Motion vector of one pixel.
  typedef struct packed {
    flow_val_t u;
    flow_val_t v;
  } flow2_t;

  // Motion vector and luminance change of one pixel.
  typedef struct packed {
    flow_val_t u;
    flow_val_t v;
    flow_val_t xi;
  } flow3_t;

  // Saturate a wide signed value to the flow word.
  function automatic flow_val_t sat_flow(input logic signed [63:0] x);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (FLOW_W-1)) - 64'sd1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (FLOW_W-1));
    if (x > MAXV)      return flow_val_t'(MAXV);
    else if (x < MINV) return flow_val_t'(MINV);
    else               return flow_val_t'(x);
  endfunction

endpackage
