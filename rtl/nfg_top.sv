// nfg_top: fully pipelined numerical function generator (NFG) based on a
// K-th order piecewise polynomial over non-uniform segments.
//
// y = g(x, i) = ((A_K*d + A_{K-1})*d + ... )*d + A_0, d = x - q_i,
// evaluated by Horner's rule after three steps:
//   1. the segment index encoder (an LUT cascade) maps x to its segment i;
//   2. the coefficients table returns -q_i and A_K(i) .. A_0(i);
//   3. an adder forms d = x - q_i, which is short because q_i is the centre
//      of segment i.
// K Horner stages (a multiplier and an adder each) follow, and a final
// rounding step drops the G guard bits and saturates to N bits.
//
// Interface: x and y are N-bit two's complement codes with one integer bit
// (value = code * 2^-(N-1)). in_valid marks a sample; out_valid marks its
// result. There is no back-pressure: one sample per cycle is accepted.
// Timing: y follows x by LATENCY = NCELLS + 3 + 2*K cycles (15 at the
// defaults). Only the valid pipeline is reset (rst_n, active low, synchronous).
// With U = 0 (a single segment) the encoder and table are left out, the
// coefficients become constants and the latency drops to 2 + 2*K.
//
// The function evaluated is fixed by the two table files. The defaults give
// cos(pi*x) for 0 <= x <= 1/2 at 24 bits with K = 2 and 128 segments; every
// input in that domain is within 2^-(N-1) of the exact value. Inputs outside
// the domain use the first or last segment's polynomial.
//
// The block structure (encoder, table, subtracting adder, K multiplier/adder
// rows) follows the design method; register placement, formats and the
// valid signal are this implementation's choice.
module nfg_top #(
  parameter int unsigned N         = nfg_pkg::N_DEF,
  parameter int unsigned K         = nfg_pkg::K_DEF,
  parameter int unsigned U         = nfg_pkg::U_DEF,
  parameter int unsigned G         = nfg_pkg::G_DEF,
  parameter int unsigned DB        = nfg_pkg::DB_DEF,
  parameter int unsigned AW        = nfg_pkg::AW_DEF,
  parameter int unsigned VW        = nfg_pkg::VW_DEF,
  parameter int unsigned NCELLS    = nfg_pkg::NCELLS_DEF,
  parameter int unsigned CELL_W    = nfg_pkg::CELL_W_DEF,
  parameter string       BND_FILE  = nfg_pkg::BND_FILE_DEF,
  parameter string       COEF_FILE = nfg_pkg::COEF_FILE_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [N-1:0] x,
  output logic                out_valid,
  output logic signed [N-1:0] y
);
  localparam int unsigned DW      = DB + 1;
  localparam int unsigned ENC_LAT = (U > 0) ? NCELLS + 1 : 0;   // encoder + table
  localparam int unsigned LATENCY = ENC_LAT + 2 + 2 * K;
  localparam int unsigned IW      = (U > 0) ? U : 1;
  localparam int unsigned WW      = N + (K + 1) * AW;

  logic [N-1:0]       neg_q;
  logic [K:0][AW-1:0] coef;
  logic [IW-1:0]      idx;       // segment index (0 when there is one segment)

  if (U > 0) begin : g_table
    // ---- 1. segment index ------------------------------------------------
    seg_index_encoder #(.N(N), .U(U), .NCELLS(NCELLS), .CELL_W(CELL_W),
                        .BND_FILE(BND_FILE))
      u_enc (.clk(clk), .x(x), .idx(idx));

    // ---- 2. coefficients table -------------------------------------------
    coef_rom #(.N(N), .K(K), .U(U), .AW(AW), .COEF_FILE(COEF_FILE))
      u_rom (.clk(clk), .idx(idx), .neg_q(neg_q), .coef(coef));
  end else begin : g_const
    // A single segment: the coefficients are constants (a one-word table
    // that is never addressed), and neither encoder nor table register
    // is needed.
    logic [WW-1:0] word [1];
    initial $readmemh(COEF_FILE, word);
    assign {neg_q, coef} = word[0];
    assign idx = '0;
  end

  // x travels beside the encoder and table
  logic [N-1:0] x_dly [ENC_LAT+1];
  assign x_dly[0] = x;
  for (genvar s = 1; s <= ENC_LAT; s++) begin : g_xdly
    always_ff @(posedge clk)
      x_dly[s] <= x_dly[s-1];
  end

  // ---- 3. d = x - q_i ----------------------------------------------------
  logic signed [DW-1:0] d0;

  dx_adder #(.N(N), .DW(DW))
    u_dx (.clk(clk), .x(x_dly[ENC_LAT]), .neg_q(neg_q), .d(d0));

  // Coefficients, delayed to meet their Horner stage: stage s (s = 0..K-1)
  // uses A_{K-1-s} and starts 1 + 2s cycles after the table output.
  logic [K:0][AW-1:0] coef_dly [2*K];
  always_ff @(posedge clk) coef_dly[0] <= coef;
  for (genvar s = 1; s < 2 * K; s++) begin : g_cdly
    always_ff @(posedge clk)
      coef_dly[s] <= coef_dly[s-1];
  end

  // ---- 4. Horner chain ---------------------------------------------------
  logic signed [VW-1:0] v [K+1];
  logic signed [DW-1:0] dd [K+1];

  assign v[0]  = VW'($signed(coef_dly[0][K]));
  assign dd[0] = d0;

  for (genvar s = 0; s < K; s++) begin : g_horner
    horner_stage #(.VW(VW), .DW(DW), .AW(AW), .DB(DB))
      u_stage (.clk(clk), .v_in(v[s]), .d(dd[s]),
               .a($signed(coef_dly[2*s][K-1-s])),
               .v_out(v[s+1]), .d_out(dd[s+1]));
  end

  // ---- 5. drop guard bits, round, saturate -------------------------------
  localparam logic signed [VW-G:0] YMAX = (VW-G+1)'((1 << (N-1)) - 1);
  localparam logic signed [VW-G:0] YMIN = -(VW-G+1)'(1 << (N-1));
  logic signed [VW:0]   v_rnd;    // one bit wider: the rounding add cannot wrap
  logic signed [VW-G:0] y_full;

  assign v_rnd  = (VW+1)'(v[K]) + ((VW+1)'(1) <<< (G - 1));
  assign y_full = (VW-G+1)'(v_rnd >>> G);

  always_ff @(posedge clk) begin
    if (y_full > YMAX)      y <= N'(YMAX);
    else if (y_full < YMIN) y <= N'(YMIN);
    else                    y <= N'(y_full);
  end

  // ---- valid pipeline ----------------------------------------------------
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];
endmodule
