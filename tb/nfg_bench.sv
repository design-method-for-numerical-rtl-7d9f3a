// nfg_bench: one end-to-end run of the generator in a configuration other
// than the default, for the variant testbenches.
//
// It instantiates nfg_top with the given configuration and table files,
// drives every input code from LO to HI through nfg_driver and checks
// accuracy and latency. It also records which segments were selected and
// reports, through `missing`, how many of these events never happened: all
// 2^U segments used, an idle input cycle, and a run of back-to-back results
// as long as the pipeline. SAT_EXPECTED adds output saturation to that list
// for functions that reach 1.0.
module nfg_bench #(
  parameter int unsigned N = 16, K = 1, U = 7, DB = 7, AW = 20, VW = 21,
  parameter int unsigned NCELLS = 4, CELL_W = 3,
  parameter int          FUNC = 0,
  parameter longint      LO = 0, HI = 64'd16384,
  parameter bit          SAT_EXPECTED = 1'b1,
  parameter string       BND_FILE  = "rtl/nfg_cos_k1_n16_bnd.hex",
  parameter string       COEF_FILE = "rtl/nfg_cos_k1_n16_coef.hex"
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   missing
);
  localparam int unsigned T = 1 << U;
  localparam int unsigned LATENCY = ((U > 0) ? NCELLS + 1 : 0) + 2 + 2 * K;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, in_valid, out_valid, drv_done;
  logic signed [N-1:0] x, y;
  int bubbles, saturations, max_run, segs_seen;
  bit seen [T];
  logic [NCELLS-1:0] vpipe;

  nfg_top #(.N(N), .K(K), .U(U), .G(4), .DB(DB), .AW(AW), .VW(VW),
            .NCELLS(NCELLS), .CELL_W(CELL_W), .BND_FILE(BND_FILE), .COEF_FILE(COEF_FILE))
    dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
         .out_valid(out_valid), .y(y));

  nfg_driver #(.N(N), .LATENCY(LATENCY), .FUNC(FUNC), .LO(LO), .HI(HI)) drv (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid),
    .y(y), .done(drv_done), .checks(checks), .failures(failures), .bubbles(bubbles),
    .saturations(saturations), .max_run(max_run));

  always @(posedge clk) begin
    vpipe <= {vpipe[NCELLS-2:0], in_valid & rst_n};
    if (vpipe[NCELLS-1]) seen[dut.idx] <= 1'b1;
  end

  initial begin
    done = 1'b0; missing = 0; vpipe = '0;
    foreach (seen[i]) seen[i] = 1'b0;
    repeat (2) @(posedge clk);
    wait (drv_done);
    segs_seen = 0;
    foreach (seen[i]) segs_seen += int'(seen[i]);
    $display("segments used %0d/%0d, idle cycles %0d, saturations %0d, longest run %0d",
             segs_seen, T, bubbles, saturations, max_run);
    missing = int'(segs_seen != T) + int'(bubbles == 0) + int'(max_run < int'(LATENCY))
            + int'(SAT_EXPECTED && saturations == 0);
    done = 1'b1;
  end
endmodule
