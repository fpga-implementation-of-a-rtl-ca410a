// awgn_gen_tb: statistical self-check of the complex AWGN generator.
//
// Collects 40000 samples per rail (10_7, so 128 LSB = 1.0) and checks:
// mean within +-0.03, variance within 0.92..1.08, excess kurtosis within
// +-0.4, fraction beyond 2 sigma within 3.5%..5.5% (Gaussian: 4.55%),
// I/Q cross-correlation and lag-1..3 autocorrelation coefficients within
// +-0.03, and that reset restarts the identical sequence.
module awgn_gen_tb;
  localparam int N = 40000;
  logic clk = 0, rst = 1;
  logic signed [9:0] ni, nq;
  int checks = 0, failures = 0;
  real xi [N], xq [N];
  int first [8];

  awgn_gen dut (.clk, .rst, .noise_i(ni), .noise_q(nq));
  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input real v, input real lo, input real hi);
    checks++;
    if (v < lo || v > hi) begin failures++; $display("%s = %f outside [%f, %f]", what, v, lo, hi); end
    else $display("%s = %f", what, v);
  endtask

  function automatic real corr(input int lag, input bit xq_sel);
    real sa, sb, sab, saa, sbb, a, b;
    int n;
    sa = 0; sb = 0; sab = 0; saa = 0; sbb = 0; n = N - lag;
    for (int k = 0; k < n; k++) begin
      a = xi[k]; b = xq_sel ? xq[k + lag] : xi[k + lag];
      sa += a; sb += b; sab += a * b; saa += a * a; sbb += b * b;
    end
    return (sab / n - (sa / n) * (sb / n)) / $sqrt((saa / n - (sa / n) ** 2) * (sbb / n - (sb / n) ** 2));
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (6) @(posedge clk);
    #1;
    for (int k = 0; k < 8; k++) begin first[k] = int'(ni); @(posedge clk); #1; end
    for (int k = 0; k < N; k++) begin
      xi[k] = real'(ni) / 128.0; xq[k] = real'(nq) / 128.0;
      @(posedge clk); #1;
    end
    for (int r = 0; r < 2; r++) begin
      real m, v, k4, s;
      int out2;
      m = 0; v = 0; k4 = 0; out2 = 0;
      for (int k = 0; k < N; k++) m += (r ? xq[k] : xi[k]);
      m /= N;
      for (int k = 0; k < N; k++) begin
        real d;
        d = (r ? xq[k] : xi[k]) - m;
        v += d * d; k4 += d * d * d * d;
      end
      v /= N; k4 = k4 / N / (v * v) - 3.0;
      s = $sqrt(v);
      for (int k = 0; k < N; k++) if (((r ? xq[k] : xi[k]) - m) > 2.0 * s || ((r ? xq[k] : xi[k]) - m) < -2.0 * s) out2++;
      chk(r ? "Q mean" : "I mean", m, -0.03, 0.03);
      chk(r ? "Q variance" : "I variance", v, 0.92, 1.08);
      chk(r ? "Q excess kurtosis" : "I excess kurtosis", k4, -0.4, 0.4);
      chk(r ? "Q beyond 2 sigma" : "I beyond 2 sigma", real'(out2) / N, 0.035, 0.055);
    end
    chk("I/Q cross-correlation lag 0", corr(0, 1), -0.03, 0.03);
    chk("I/Q cross-correlation lag 1", corr(1, 1), -0.03, 0.03);
    for (int l = 1; l <= 3; l++) chk($sformatf("I autocorrelation lag %0d", l), corr(l, 0), -0.03, 0.03);
    // reset reproducibility
    rst = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (6) @(posedge clk);
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (int'(ni) != first[k]) begin failures++; $display("sequence not restarted by reset"); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
