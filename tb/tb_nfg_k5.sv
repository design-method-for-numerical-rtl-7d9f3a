// tb_nfg_k5: fifth-order generator for cos(pi*x), 0 <= x <= 1/2, 15-bit. One segment covers the whole domain, so the coefficients are constants and there is no segment index encoder or table (latency 12 cycles).
//
// Every input code of the domain is applied and each result is checked to be
// within one output LSB of the exact value and to arrive after the pipeline
// latency.
module tb_nfg_k5;
  logic done;
  int checks, failures, missing;

  nfg_bench #(.N(15), .K(5), .U(0), .DB(13), .AW(20), .VW(20), .NCELLS(4), .CELL_W(3), .FUNC(0), .LO(0), .HI(64'd8192), .SAT_EXPECTED(1'b1), .COEF_FILE("rtl/nfg_cos_k5_n15_coef.hex")) bench (.done(done), .checks(checks), .failures(failures), .missing(missing));

  initial begin
    #100;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + missing);
    $finish;
  end

  initial begin : watchdog
    #(64'd400000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
