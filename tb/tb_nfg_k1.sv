// tb_nfg_k1: first-order generator for cos(pi*x), 0 <= x <= 1/2, 16-bit (110 segments from the segmentation, split to 128; latency 9 cycles).
//
// Every input code of the domain is applied and each result is checked to be
// within one output LSB of the exact value and to arrive after the pipeline
// latency; every segment must be selected at least once.
module tb_nfg_k1;
  logic done;
  int checks, failures, missing;

  nfg_bench #(.N(16), .K(1), .U(7), .DB(7), .AW(20), .VW(21), .NCELLS(4), .CELL_W(3), .FUNC(0), .LO(0), .HI(64'd16384), .SAT_EXPECTED(1'b1), .BND_FILE("rtl/nfg_cos_k1_n16_bnd.hex"), .COEF_FILE("rtl/nfg_cos_k1_n16_coef.hex")) bench (.done(done), .checks(checks), .failures(failures), .missing(missing));

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
