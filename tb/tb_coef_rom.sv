// tb_coef_rom: checks the coefficients table read port.
//
// The testbench loads the same table file into its own array, splits each
// word into -q_i and A_K..A_0 by the documented layout, and compares with the
// ROM outputs one cycle after the index is applied. It also checks that
// every -q_i is the negated centre of a segment, i.e. that the q_i increase
// with i. All 128 indices are read in order, then random ones.
module tb_coef_rom;
  localparam int unsigned N = 24, K = 2, U = 7, AW = 28;
  localparam int unsigned WW = N + (K + 1) * AW;
  localparam string COEF = "rtl/nfg_cos_k2_n24_coef.hex";

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WW-1:0]      ref_mem [1 << U];
  logic [U-1:0]       idx;
  logic [N-1:0]       neg_q;
  logic [K:0][AW-1:0] coef;
  int checks = 0, failures = 0;
  longint prev_q;

  coef_rom #(.N(N), .K(K), .U(U), .AW(AW), .COEF_FILE(COEF))
    dut (.clk(clk), .idx(idx), .neg_q(neg_q), .coef(coef));

  task automatic read_check(int i);
    longint q;
    idx = U'(i);
    @(posedge clk); #1;
    checks++;
    if (neg_q !== ref_mem[i][WW-1 -: N]) begin
      failures++;
      $display("index %0d: -q %h want %h", i, neg_q, ref_mem[i][WW-1 -: N]);
    end
    for (int j = 0; j <= K; j++) begin
      checks++;
      if (coef[j] !== ref_mem[i][j*AW +: AW]) begin
        failures++;
        $display("index %0d: A_%0d %h want %h", i, j, coef[j], ref_mem[i][j*AW +: AW]);
      end
    end
    q = -longint'($signed(neg_q));
    if (i > 0 && i == int'(idx) && prev_q >= 0) begin
      checks++;
      if (q <= prev_q) begin
        failures++;
        $display("q not increasing at %0d", i);
      end
    end
    prev_q = q;
  endtask

  initial begin
    $readmemh(COEF, ref_mem);
    prev_q = -1;
    for (int i = 0; i < (1 << U); i++) read_check(i);
    prev_q = -1;
    repeat (500) begin
      read_check(int'($urandom_range((1 << U) - 1)));
      prev_q = -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
