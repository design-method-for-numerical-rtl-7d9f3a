// tb_seg_index_encoder: checks the pipelined LUT cascade against a linear
// search over the segment ends.
//
// A new input code is applied every cycle: every code on either side of each
// segment end, then random codes over the whole input range (including
// negative ones, which belong to segment 0). Each index is expected exactly
// NCELLS = 8 cycles after its input.
module tb_seg_index_encoder;
  localparam int unsigned N = 24, U = 7, T = 1 << U, NC = 8;
  localparam string BND = "rtl/nfg_cos_k2_n24_bnd.hex";

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] bnd [T];
  logic [N-1:0] x;
  logic [U-1:0] idx;
  int exp_q [$];
  int checks = 0, failures = 0, n_in = 0;

  seg_index_encoder #(.N(N), .U(U), .NCELLS(NC), .CELL_W(2), .BND_FILE(BND))
    dut (.clk(clk), .x(x), .idx(idx));

  // index of a two's complement code (segment ends are stored offset-binary)
  function automatic int seg_of(logic [N-1:0] code);
    longint u;
    int i = 0;
    u = longint'({~code[N-1], code[N-2:0]});
    while (i < T - 1 && longint'(bnd[i]) < u) i++;
    return i;
  endfunction

  task automatic apply(logic [N-1:0] code);
    x = code;
    exp_q.push_back(seg_of(code));
    n_in++;
    @(posedge clk); #1;
    if (n_in >= NC) begin
      int e = exp_q.pop_front();
      checks++;
      if (int'(idx) != e) begin
        failures++;
        if (failures < 10) $display("index %0d, expected %0d", idx, e);
      end
    end
  endtask

  initial begin
    $readmemh(BND, bnd);
    for (int j = 0; j < T - 1; j++)
      for (int o = -1; o <= 1; o++)
        apply((bnd[j] + N'(o)) ^ (N'(1) << (N - 1)));
    repeat (5000) apply(N'($urandom));
    repeat (NC) apply('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
