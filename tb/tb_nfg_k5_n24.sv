// tb_nfg_k5_n24: fifth-order generator for cos(pi*x), 0 <= x <= 1/2, 24-bit (3 segments, split to 4; latency 17 cycles).
//
// Every input code of the domain is applied and each result is checked to be
// within one output LSB of the exact value and to arrive after the pipeline
// latency; every segment must be selected at least once.
module tb_nfg_k5_n24;
  logic done;
  int checks, failures, missing;

  nfg_bench #(.N(24), .K(5), .U(2), .DB(20), .AW(28), .VW(29), .NCELLS(4), .CELL_W(4), .FUNC(0), .LO(0), .HI(64'd4194304), .SAT_EXPECTED(1'b1), .BND_FILE("rtl/nfg_cos_k5_n24_bnd.hex"), .COEF_FILE("rtl/nfg_cos_k5_n24_coef.hex")) bench (.done(done), .checks(checks), .failures(failures), .missing(missing));

  initial begin
    #100;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + missing);
    $finish;
  end

  initial begin : watchdog
    #(64'd60000000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
