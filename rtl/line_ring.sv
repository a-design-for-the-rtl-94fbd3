// line_ring: circular line buffer holding the last LINES image rows of a
// block, LINE_W pixels each, with one write port and NRD asynchronous read
// ports.
//
// The window units (hierarchical image creation, luminance gradient,
// motion compensation) write the incoming row into slot (row mod LINES) and
// read any pixel of the rows still held. Keeping only a few lines instead of
// the whole image is how the source, hierarchical and motion compensation
// image memories are kept small; the line counts (5+1, 3+1, 8) follow the
// pipeline description, the row-mod-LINES addressing is this design's own.
//
// Interface: we/wr_slot/wr_x/wr_data write one pixel per clock edge;
// rd_slot[k]/rd_x[k] select a pixel and rd_data[k] returns it in the same
// cycle (combinational read, registered write).
module line_ring #(
  parameter int DW     = 24,
  parameter int LINES  = 4,
  parameter int LINE_W = 244,
  parameter int NRD    = 1,
  localparam int SW = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int XW = (LINE_W > 1) ? $clog2(LINE_W) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [SW-1:0]       wr_slot,
  input  logic [XW-1:0]       wr_x,
  input  logic [DW-1:0]       wr_data,
  input  logic [SW-1:0]       rd_slot [NRD],
  input  logic [XW-1:0]       rd_x    [NRD],
  output logic [DW-1:0]       rd_data [NRD]
);

  logic [DW-1:0] mem [LINES*LINE_W];

  always_ff @(posedge clk) begin
    if (we) mem[int'(wr_slot)*LINE_W + int'(wr_x)] <= wr_data;
  end

  always_comb begin
    for (int k = 0; k < NRD; k++)
      rd_data[k] = mem[int'(rd_slot[k])*LINE_W + int'(rd_x[k])];
  end

endmodule
