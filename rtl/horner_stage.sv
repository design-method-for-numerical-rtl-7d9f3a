// horner_stage: one step of Horner's rule, v_out = v_in * d + a, with the
// fixed-point alignment of nfg_pkg: v_out = round(v_in * d / 2^DB) + a.
//
// It is the multiplier and the adder of one row of the architecture. The
// multiplier result is registered, then shifted right by DB with
// round-half-up and added to the coefficient a, whose register stage keeps it
// aligned with the product. d is passed on, delayed by the same two cycles,
// for the next stage.
//
// Timing: v_out and d_out appear two cycles after v_in, d and a; one new
// operand set per cycle. The partial result is kept at VW bits; the table
// generator checks that no partial result exceeds that width, so the upper
// bits of the shifted product are dropped on purpose and are never read.
module horner_stage #(
  parameter int unsigned VW = nfg_pkg::VW_DEF,
  parameter int unsigned DW = nfg_pkg::DB_DEF + 1,
  parameter int unsigned AW = nfg_pkg::AW_DEF,
  parameter int unsigned DB = nfg_pkg::DB_DEF
) (
  input  logic                 clk,
  input  logic signed [VW-1:0] v_in,
  input  logic signed [DW-1:0] d,
  input  logic signed [AW-1:0] a,
  output logic signed [VW-1:0] v_out,
  output logic signed [DW-1:0] d_out
);
  localparam int unsigned PW = VW + DW;

  logic signed [PW-1:0] prod_q;
  logic signed [AW-1:0] a_q;
  logic signed [DW-1:0] d_q;
  logic signed [PW-1:0] rounded;

  always_ff @(posedge clk) begin
    prod_q <= PW'(v_in) * PW'(d);
    a_q    <= a;
    d_q    <= d;
  end

  assign rounded = (prod_q + (PW'(1) <<< (DB - 1))) >>> DB;

  always_ff @(posedge clk) begin
    v_out <= VW'(rounded) + VW'(a_q);
    d_out <= d_q;
  end
endmodule
