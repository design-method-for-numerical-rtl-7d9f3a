// tb_dx_adder: checks d = x - q_i one cycle after x and -q_i are applied,
// for random x and centres q_i with |x - q_i| within the DW-bit range, at
// both ends of that range, and across the sign boundary of x.
module tb_dx_adder;
  localparam int unsigned N = 24, DW = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]         x, neg_q;
  logic signed [DW-1:0] d;
  int checks = 0, failures = 0;

  dx_adder #(.N(N), .DW(DW)) dut (.clk(clk), .x(x), .neg_q(neg_q), .d(d));

  task automatic try_pair(longint q, longint diff);
    x     = N'(q + diff);
    neg_q = N'(-q);
    @(posedge clk); #1;
    checks++;
    if (longint'(d) != diff) begin
      failures++;
      $display("q=%0d diff=%0d got %0d", q, diff, d);
    end
  endtask

  initial begin
    try_pair(0, -(1 << (DW - 1)));
    try_pair(0, (1 << (DW - 1)) - 1);
    try_pair(-5, 3);
    try_pair((1 << (N - 1)) - 100, 50);
    repeat (2000)
      try_pair(longint'($urandom_range((1 << N) - 1)) - (1 << (N - 1)),
               longint'($urandom_range((1 << DW) - 1)) - (1 << (DW - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
