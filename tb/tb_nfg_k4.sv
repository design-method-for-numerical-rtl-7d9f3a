// tb_nfg_k4: fourth-order generator for cos(pi*x), 0 <= x <= 1/2, 11-bit. One segment covers the whole domain, so the coefficients are constants and there is no segment index encoder or table (latency 10 cycles).
//
// Every input code of the domain is applied and each result is checked to be
// within one output LSB of the exact value and to arrive after the pipeline
// latency.
module tb_nfg_k4;
  logic done;
  int checks, failures, missing;

  nfg_bench #(.N(11), .K(4), .U(0), .DB(9), .AW(16), .VW(16), .NCELLS(4), .CELL_W(3), .FUNC(0), .LO(0), .HI(64'd512), .SAT_EXPECTED(1'b1), .COEF_FILE("rtl/nfg_cos_k4_n11_coef.hex")) bench (.done(done), .checks(checks), .failures(failures), .missing(missing));

  initial begin
    #100;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + missing);
    $finish;
  end

  initial begin : watchdog
    #(64'd100000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
