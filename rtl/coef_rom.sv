// coef_rom: the coefficients table. For segment index i it returns -q_i
// (the negated segment centre, as an N-bit input code) and the K+1 scaled
// coefficients A_K(i) .. A_0(i) of the polynomial in powers of (x - q_i),
// see nfg_pkg for the scaling.
//
// The table has 2^U words laid out as {-q_i, A_K, ..., A_1, A_0}, A_0 in the
// least significant AW bits, and is loaded from COEF_FILE (one hex word per
// line). The read is registered: data appears one cycle after idx.
//
// Storing -q_i next to the coefficients, and sizing the table at 2^U words
// with T = 2^U segments, follows the design method; the word layout and the
// common width AW for all coefficients are this implementation's choice.
module coef_rom #(
  parameter int unsigned N         = nfg_pkg::N_DEF,
  parameter int unsigned K         = nfg_pkg::K_DEF,
  parameter int unsigned U         = nfg_pkg::U_DEF,
  parameter int unsigned AW        = nfg_pkg::AW_DEF,
  parameter string       COEF_FILE = nfg_pkg::COEF_FILE_DEF
) (
  input  logic                 clk,
  input  logic [U-1:0]         idx,
  output logic [N-1:0]         neg_q,  // -q_i
  output logic [K:0][AW-1:0]   coef    // coef[j] = A_j(i), two's complement
);
  localparam int unsigned WW = N + (K + 1) * AW;

  logic [WW-1:0] rom [1 << U];

  initial $readmemh(COEF_FILE, rom);

  always_ff @(posedge clk)
    {neg_q, coef} <= rom[idx];
endmodule
