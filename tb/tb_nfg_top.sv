// tb_nfg_top: end-to-end test of the generator at its default configuration
// (cos(pi*x), 24-bit, second order, 128 segments).
//
// Every input code of the domain 0 <= x <= 1/2 (2^22 + 1 codes) is applied
// through nfg_driver, with random idle cycles, and every result is checked
// for accuracy (within one output LSB of cos(pi*x)) and for the 15-cycle
// latency. It also counts the events the design must go through: every one
// of the 128 segments selected, idle input cycles, saturation of the output
// at x = 0 (cos 0 = 1 is not representable) and a run of back-to-back results
// at the full rate of one per cycle. An event that never happened is a failure.
module tb_nfg_top;
  localparam int unsigned N = 24;
  localparam int unsigned T = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, in_valid, out_valid, done;
  logic signed [N-1:0] x, y;
  int checks, failures, bubbles, saturations, max_run;
  bit seen [T];
  int segs_seen, missing;

  nfg_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
               .out_valid(out_valid), .y(y));

  nfg_driver #(.N(N), .LATENCY(15), .FUNC(0), .LO(0), .HI(64'd4194304)) drv (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid),
    .y(y), .done(done), .checks(checks), .failures(failures), .bubbles(bubbles),
    .saturations(saturations), .max_run(max_run));

  // segment index as it leaves the encoder (8 cycles after the input)
  logic [7:0] vpipe;
  always @(posedge clk) begin
    vpipe <= {vpipe[6:0], in_valid & rst_n};
    if (vpipe[7]) seen[dut.idx] <= 1'b1;
  end

  initial begin
    vpipe = '0;
    foreach (seen[i]) seen[i] = 1'b0;
    repeat (2) @(posedge clk);
    wait (done);
    segs_seen = 0;
    foreach (seen[i]) segs_seen += int'(seen[i]);
    $display("segments used %0d/%0d, idle cycles %0d, saturations %0d, longest run %0d",
             segs_seen, T, bubbles, saturations, max_run);
    missing = int'(segs_seen != T) + int'(bubbles == 0) + int'(saturations == 0)
            + int'(max_run < 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + missing);
    $finish;
  end

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
