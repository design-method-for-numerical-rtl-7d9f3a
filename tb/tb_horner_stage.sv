// tb_horner_stage: checks one Horner step, v_out = floor((v*d + 2^(DB-1)) /
// 2^DB) + a, two cycles after its operands, with a new operand set every
// cycle. Operands are random within ranges that cannot overflow VW bits,
// plus the extreme corners; d_out must equal d delayed by two cycles.
module tb_horner_stage;
  localparam int unsigned VW = 29, DW = 16, AW = 28, DB = 15;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [VW-1:0] v_in, v_out;
  logic signed [DW-1:0] d, d_out;
  logic signed [AW-1:0] a;
  longint exp_v [$];
  longint exp_d [$];
  int checks = 0, failures = 0, n_in = 0;

  horner_stage #(.VW(VW), .DW(DW), .AW(AW), .DB(DB))
    dut (.clk(clk), .v_in(v_in), .d(d), .a(a), .v_out(v_out), .d_out(d_out));

  function automatic longint floor_div(longint num, longint den);
    longint qt = num / den;
    if ((num % den != 0) && (num < 0)) qt--;
    return qt;
  endfunction

  task automatic apply(longint vv, longint dv, longint av);
    v_in = VW'(vv);
    d    = DW'(dv);
    a    = AW'(av);
    exp_v.push_back(floor_div(vv * dv + (longint'(1) << (DB - 1)), longint'(1) << DB) + av);
    exp_d.push_back(dv);
    n_in++;
    @(posedge clk); #1;
    if (n_in >= 2) begin
      longint ev, ed;
      ev = exp_v.pop_front();
      ed = exp_d.pop_front();
      checks += 2;
      if (longint'(v_out) != ev) begin
        failures++;
        if (failures < 10) $display("v_out %0d want %0d", v_out, ev);
      end
      if (longint'(d_out) != ed) failures++;
    end
  endtask

  initial begin
    // |v| < 2^(VW-2), |a| < 2^(VW-3): result stays inside VW bits
    apply(-(longint'(1) << (VW - 2)), -(longint'(1) << (DW - 1)), 0);
    apply((longint'(1) << (VW - 2)) - 1, -(longint'(1) << (DW - 1)), 12345);
    apply(-7, 3, -1);
    apply(1, 1, 0);
    repeat (3000)
      apply(longint'($urandom_range((1 << (VW - 1)) - 1)) - (1 << (VW - 2)),
            longint'($urandom_range((1 << DW) - 1)) - (1 << (DW - 1)),
            longint'($urandom_range((1 << (VW - 2)) - 1)) - (1 << (VW - 3)));
    apply(0, 0, 0);
    apply(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
