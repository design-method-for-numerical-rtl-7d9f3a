// nfg_driver: stimulus and scoreboard shared by the end-to-end testbenches
// of the numerical function generator.
//
// After reset it applies every input code from LO to HI once, in order, with
// a random idle cycle about one cycle in sixteen, then drains the pipeline.
// Each result is checked against the exact function value computed in double
// precision (|y - f(x)| <= 2^-(N-1)), and the cycle distance between a
// sample and its result is checked against LATENCY. It also counts idle
// input cycles, results that hit the saturation limit, and the longest run of
// back-to-back results, so that the caller can check those events happened.
// FUNC selects the reference: 0 = cos(pi*x), 1 = sqrt(x), 2 = 1/(1+x).
module nfg_driver #(
  parameter int unsigned N       = 24,
  parameter int unsigned LATENCY = 12,
  parameter int          FUNC    = 0,
  parameter longint      LO      = 0,
  parameter longint      HI      = 64'd4194304
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                in_valid,
  output logic signed [N-1:0] x,
  input  logic                out_valid,
  input  logic signed [N-1:0] y,
  output logic                done,
  output int                  checks,
  output int                  failures,
  output int                  bubbles,
  output int                  saturations,
  output int                  max_run
);
  localparam real ULP = 1.0 / real'(longint'(1) << (N - 1));
  localparam longint YMAX = (longint'(1) << (N - 1)) - 1;

  longint cycle = 0;
  longint q_x [$];
  longint q_t [$];
  int     run = 0;
  real    worst = 0.0;
  int     n_checks = 0, sb_fail = 0, end_fail = 0, n_idle = 0, n_sat = 0, longest = 0;

  assign checks      = n_checks;
  assign failures    = sb_fail + end_fail;
  assign bubbles     = n_idle;
  assign saturations = n_sat;
  assign max_run     = longest;

  function automatic real ref_f(longint code);
    real xr;
    xr = real'(code) * ULP;
    case (FUNC)
      1:       return $sqrt(xr);
      2:       return 1.0 / (1.0 + xr);
      default: return $cos(3.14159265358979323846 * xr);
    endcase
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(posedge clk) begin
    if (in_valid && rst_n) begin
      q_x.push_back(longint'(x));
      q_t.push_back(cycle);
    end
    if (out_valid && rst_n) begin
      run <= run + 1;
      if (run + 1 > longest) longest <= run + 1;
      if (q_x.size() == 0) begin
        sb_fail <= sb_fail + 1;
        $display("unexpected result at cycle %0d", cycle);
      end else begin
        longint xi, ti;
        real err;
        xi  = q_x.pop_front();
        ti  = q_t.pop_front();
        err = real'(y) * ULP - ref_f(xi);
        if (err < 0.0) err = -err;
        n_checks <= n_checks + 2;
        if (err > worst) worst <= err;
        if (cycle - ti != longint'(LATENCY)) begin
          sb_fail <= sb_fail + 1;
          if (sb_fail < 10) $display("latency %0d for x=%0d", cycle - ti, xi);
        end
        if (err > ULP * (1.0 + 1e-9)) begin
          sb_fail <= sb_fail + 1;
          if (sb_fail < 10)
            $display("x=%0d y=%0d error %g ulp", xi, y, err / ULP);
        end
        if (longint'(y) == YMAX || longint'(y) == -YMAX - 1) n_sat <= n_sat + 1;
      end
    end else begin
      run <= 0;
    end
  end

  initial begin
    done = 1'b0;
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (longint c = LO; c <= HI; ) begin
      if ($urandom_range(15) == 0) begin
        in_valid <= 1'b0;
        n_idle   <= n_idle + 1;
      end else begin
        in_valid <= 1'b1;
        x        <= N'(c);
        c++;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 4) @(posedge clk);
    if (q_x.size() != 0) begin
      end_fail <= end_fail + 1;
      $display("%0d results missing", q_x.size());
    end
    @(posedge clk);
    $display("worst error %g ulp over %0d samples", worst / ULP, n_checks / 2);
    done <= 1'b1;
  end
endmodule
