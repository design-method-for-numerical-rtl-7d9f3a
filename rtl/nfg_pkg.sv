// nfg_pkg: default configuration of the numerical function generator (NFG).
//
// The generator evaluates f(x) = cos(pi*x) on 0 <= x <= 1/2 with a 24-bit
// input and a second-order (K = 2) piecewise polynomial over non-uniform
// segments. 24-bit precision and second order are the operating point the
// design method recommends for 18..24-bit accuracy; the function is one of the
// three benchmark functions it is evaluated on. The numeric formats below
// (guard bits, coefficient width, shift per Horner step) follow from the
// error analysis of the table generator and are this implementation's choice.
//
// Number formats (all two's complement, one integer bit):
//   x, y : N bits, value = code * 2^-(N-1).
//   d    : x - q_i in units of one input LSB, DW = DB + 1 bits.
//   A_j  : coefficient c'_j scaled by 2^(N-1+G+(DB-(N-1))*j), AW bits.
//   v_j  : Horner partial result with N-1+G+DB*j fraction bits, VW bits.
// One Horner step is v_j = round(v_{j+1} * d / 2^DB) + A_j, so every step
// uses the same shift DB, and y = round(v_0 / 2^G) saturated to N bits.
package nfg_pkg;
  localparam int unsigned N_DEF      = 24;  // input/output precision (bits)
  localparam int unsigned K_DEF      = 2;   // polynomial order
  localparam int unsigned U_DEF      = 7;   // log2(number of segments)
  localparam int unsigned G_DEF      = 4;   // guard bits of the datapath
  localparam int unsigned DB_DEF     = 15;  // bits of |x - q_i|
  localparam int unsigned AW_DEF     = 28;  // stored coefficient width
  localparam int unsigned VW_DEF     = 29;  // Horner partial result width
  localparam int unsigned NCELLS_DEF = 8;   // LUTs in the segment-index cascade
  localparam int unsigned CELL_W_DEF = 2;   // x bits per non-first cascade LUT
  localparam string BND_FILE_DEF  = "rtl/nfg_cos_k2_n24_bnd.hex";
  localparam string COEF_FILE_DEF = "rtl/nfg_cos_k2_n24_coef.hex";
endpackage
