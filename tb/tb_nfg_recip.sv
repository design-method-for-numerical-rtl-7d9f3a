// tb_nfg_recip: second-order generator for 1/x on 1 <= x < 2, with the input code holding x - 1, 24-bit (64 segments; latency 12 cycles).
//
// Every input code of the domain is applied and each result is checked to be
// within one output LSB of the exact value and to arrive after the pipeline
// latency; every segment must be selected at least once.
module tb_nfg_recip;
  logic done;
  int checks, failures, missing;

  nfg_bench #(.N(24), .K(2), .U(6), .DB(17), .AW(28), .VW(28), .NCELLS(5), .CELL_W(3), .FUNC(2), .LO(0), .HI(64'd8388607), .SAT_EXPECTED(1'b1), .BND_FILE("rtl/nfg_recip_k2_n24_bnd.hex"), .COEF_FILE("rtl/nfg_recip_k2_n24_coef.hex")) bench (.done(done), .checks(checks), .failures(failures), .missing(missing));

  initial begin
    #100;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + missing);
    $finish;
  end

  initial begin : watchdog
    #(64'd120000000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
