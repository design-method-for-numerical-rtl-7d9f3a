// tb_lut_cell: checks one first LUT and one inner LUT of the segment-index
// cascade against the rail encoding computed directly from the segment ends.
//
// For a block of inputs (all codes sharing a prefix) the expected rails are
// {h, b} with b = index of the segment holding the block's first code and
// h = 1 when the block's last code lies in a different segment. Indices are
// found by a linear search over the segment ends read from the table file.
// Random input codes are used, plus every code next to a segment end; each
// cell output is checked one cycle after its inputs.
module tb_lut_cell;
  localparam int unsigned N = 24, U = 7, T = 1 << U;
  localparam int unsigned W0 = 10, P1 = 16, W1 = 2;
  localparam string BND = "rtl/nfg_cos_k2_n24_bnd.hex";

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  bnd [T];
  logic [W0-1:0] xb0;
  logic [W1-1:0] xb1;
  logic [U:0]    r_in1, r_out0, r_out1;
  int checks = 0, failures = 0;

  lut_cell #(.N(N), .U(U), .P(0), .W(W0), .FIRST(1'b1), .BND_FILE(BND))
    c0 (.clk(clk), .rails_in('0), .xbits(xb0), .rails_out(r_out0));
  lut_cell #(.N(N), .U(U), .P(P1), .W(W1), .FIRST(1'b0), .BND_FILE(BND))
    c1 (.clk(clk), .rails_in(r_in1), .xbits(xb1), .rails_out(r_out1));

  function automatic int seg_of(longint code);
    int i = 0;
    while (i < T - 1 && longint'(bnd[i]) < code) i++;
    return i;
  endfunction

  // rails describing the block of codes that share the top p bits of code
  function automatic logic [U:0] rails_of(longint code, int p);
    longint lo, hi;
    int b;
    lo = (code >> (N - p)) << (N - p);
    hi = lo + (longint'(1) << (N - p)) - 1;
    b  = seg_of(lo);
    return {1'(seg_of(hi) != b), U'(b)};
  endfunction

  task automatic check_code(longint code);
    xb0   = W0'(code >> (N - W0));
    r_in1 = rails_of(code, P1);
    xb1   = W1'(code >> (N - P1 - W1));
    @(posedge clk); #1;
    checks += 2;
    if (r_out0 !== rails_of(code, W0)) begin
      failures++;
      $display("first cell: code %h got %h want %h", code, r_out0, rails_of(code, W0));
    end
    if (r_in1[U] && r_out1 !== rails_of(code, P1 + W1)) begin
      failures++;
      $display("inner cell: code %h got %h want %h", code, r_out1, rails_of(code, P1 + W1));
    end
  endtask

  initial begin
    $readmemh(BND, bnd);
    for (int j = 0; j < T - 1; j++)
      for (int o = -1; o <= 1; o++)
        check_code(longint'(bnd[j]) + longint'(o));
    repeat (3000) check_code(longint'($urandom_range((1 << N) - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
