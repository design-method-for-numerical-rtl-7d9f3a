// seg_index_encoder: converts the input x into the index i of the segment
// [s_i, e_i] that holds it, using a pipelined LUT cascade.
//
// x is a two's complement code; flipping its sign bit gives an offset-binary
// code whose unsigned order is the numeric order, and the cascade works on
// that code. The first LUT reads the top W0 = N - (NCELLS-1)*CELL_W bits, each
// following LUT reads CELL_W more bits together with the rails from its left
// neighbour (see lut_cell). The index is the low U bits of the last LUT's rails.
//
// Timing: every LUT is registered, so idx appears NCELLS cycles after x. The
// input bits are delayed by a skew register chain so that each LUT sees the
// bits of the same sample. A new x can be applied every cycle.
//
// Using an LUT cascade as the segment index encoder, so that any non-uniform
// segmentation can be realised, follows the design method. The number of
// cells and the bits per cell are this implementation's choice.
module seg_index_encoder #(
  parameter int unsigned N        = nfg_pkg::N_DEF,
  parameter int unsigned U        = nfg_pkg::U_DEF,
  parameter int unsigned NCELLS   = nfg_pkg::NCELLS_DEF,
  parameter int unsigned CELL_W   = nfg_pkg::CELL_W_DEF,
  parameter string       BND_FILE = nfg_pkg::BND_FILE_DEF
) (
  input  logic         clk,
  input  logic [N-1:0] x,
  output logic [U-1:0] idx
);
  localparam int unsigned W0 = N - (NCELLS - 1) * CELL_W;

  logic [N-1:0] xs [NCELLS];       // xs[j]: offset-binary x delayed j cycles
  logic [U:0]   rails [NCELLS];    // rails[j]: output of cell j

  assign xs[0] = {~x[N-1], x[N-2:0]};

  for (genvar j = 1; j < NCELLS; j++) begin : g_skew
    always_ff @(posedge clk)
      xs[j] <= xs[j-1];
  end

  lut_cell #(.N(N), .U(U), .P(0), .W(W0), .FIRST(1'b1), .BND_FILE(BND_FILE))
    u_cell0 (.clk(clk), .rails_in('0), .xbits(xs[0][N-1 -: W0]), .rails_out(rails[0]));

  for (genvar j = 1; j < NCELLS; j++) begin : g_cell
    localparam int unsigned PJ = W0 + (j - 1) * CELL_W;
    lut_cell #(.N(N), .U(U), .P(PJ), .W(CELL_W), .FIRST(1'b0), .BND_FILE(BND_FILE))
      u_cell (.clk(clk), .rails_in(rails[j-1]), .xbits(xs[j][N-1-PJ -: CELL_W]),
              .rails_out(rails[j]));
  end

  assign idx = rails[NCELLS-1][U-1:0];
endmodule
