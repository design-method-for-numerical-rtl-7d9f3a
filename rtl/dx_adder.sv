// dx_adder: the adder that forms d = x - q_i from x and the stored -q_i.
//
// |x - q_i| is at most half the width of the widest segment, so d needs only
// DW = DB + 1 bits; the N-bit modular sum is formed and its low DW bits are
// kept, which is exact because the true difference fits in DW bits. Keeping
// d short is what keeps every multiplier small. The result is registered:
// one cycle from (x, neg_q) to d.
//
// Centring each segment at q_i = (s_i + e_i)/2 to shorten the multiplier
// operand follows the design method (q_i is rounded down to an input code);
// the register at the output is this implementation's pipelining.
module dx_adder #(
  parameter int unsigned N  = nfg_pkg::N_DEF,
  parameter int unsigned DW = nfg_pkg::DB_DEF + 1
) (
  input  logic                 clk,
  input  logic [N-1:0]         x,      // input code
  input  logic [N-1:0]         neg_q,  // -q_i
  output logic signed [DW-1:0] d       // x - q_i
);
  logic [N-1:0] sum;

  assign sum = x + neg_q;

  always_ff @(posedge clk)
    d <= DW'(sum);
endmodule
