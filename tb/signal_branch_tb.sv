// signal_branch_tb: self-checking test of one complete signal branch.
//
// Runs the branch with a 10-cycle burst clock and the guard always
// granting.  Checks:
//  * the symbol requests reaching the LDAPM are spaced by the interpolation
//    factor of the selected filter (12, 10, 8, 6);
//  * once a burst has been off longer than the filter memory the output is
//    exactly zero, and inside a burst it is not silent;
//  * the centre frequency measured from the output (phase of the lag-1
//    autocorrelation over the settled part of each burst) equals the
//    reported step * 2*pi/256 to within 3.5 steps (estimator noise on short bursts);
//  * all four filters are used.
module signal_branch_tb;
  import rasg_pkg::*;
  localparam int TD     = 10;
  localparam int NC     = 200000;
  localparam int SETTLE = 130;     // > filter memory (8 symbols * 12) + pipeline
  logic clk = 0, rst = 1;
  logic req, on;
  logic [7:0] cand_step, step, power;
  logic [1:0] fsel;
  mix_t sig_i, sig_q;
  int checks = 0, failures = 0;
  int fsel_seen [4];
  int n_bursts = 0, n_freq = 0;

  signal_branch #(.BRANCH_ID(1), .TICK_DIV(TD)) dut (
    .clk, .rst, .grant(1'b1), .req, .cand_step, .on, .step, .power, .fsel, .sig_i, .sig_q
  );
  always #5 clk = ~clk;

  function automatic real wrap_pi(input real a);
    while (a > PI)   a = a - 2.0 * PI;
    while (a <= -PI) a = a + 2.0 * PI;
    return a;
  endfunction

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since_edge, last_dr, prev_on, prev_fsel, nz;
    real ci, cq, pi_, pq, si, sq, ang, want;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    since_edge = 0; last_dr = -1; prev_on = 0; prev_fsel = 0;
    ci = 0; cq = 0; pi_ = 0; pq = 0; nz = 0;
    for (int t = 0; t < NC; t++) begin
      @(posedge clk); #1;
      if (on != prev_on[0]) begin
        // burst ended: evaluate its settled part
        if (prev_on && since_edge > SETTLE + 200) begin
          checks++;
          if (nz == 0) begin failures++; $display("t=%0d silent burst", t); end
          ang  = $atan2(cq, ci);
          want = wrap_pi(2.0 * PI * real'(step_at_fall) / 256.0);
          checks++; n_freq++;
          if (wrap_pi(ang - want) > 3.5 * 2.0 * PI / 256.0 || wrap_pi(ang - want) < -3.5 * 2.0 * PI / 256.0) begin
            failures++;
            $display("t=%0d step %0d measured %f rad want %f", t, step_at_fall, ang, want);
          end
        end
        if (on) n_bursts++;
        since_edge = 0; ci = 0; cq = 0; nz = 0;
      end else since_edge++;
      step_at_fall = step;
      si = real'(sig_i) / 16777216.0;
      sq = real'(sig_q) / 16777216.0;
      if (on && since_edge > SETTLE) begin
        // s[n] * conj(s[n-1])
        ci += si * pi_ + sq * pq;
        cq += sq * pi_ - si * pq;
        if (sig_i != 0 || sig_q != 0) nz++;
      end
      if (!on && since_edge > SETTLE) begin
        checks++;
        if (sig_i != 0 || sig_q != 0) begin
          failures++;
          if (failures < 8) $display("t=%0d output %0d,%0d while off", t, sig_i, sig_q);
        end
      end
      pi_ = si; pq = sq;
      // symbol request spacing
      if (fsel != prev_fsel[1:0] || !on) last_dr = -1;
      if (dut.data_ready) begin
        if (last_dr >= 0) begin
          int want_l;
          want_l = (fsel == 0) ? 12 : (fsel == 1) ? 10 : (fsel == 2) ? 8 : 6;
          checks++;
          if (t - last_dr != want_l) begin
            failures++;
            $display("t=%0d request spacing %0d want %0d", t, t - last_dr, want_l);
          end
        end
        last_dr = on ? t : -1;
      end
      if (on) fsel_seen[fsel]++;
      prev_on = on; prev_fsel = fsel;
    end
    $display("bursts=%0d freq-checked=%0d fsel use %0d %0d %0d %0d", n_bursts, n_freq,
             fsel_seen[0], fsel_seen[1], fsel_seen[2], fsel_seen[3]);
    checks++; if (n_freq < 20) begin failures++; $display("too few measured bursts"); end
    for (int k = 0; k < 4; k++) begin
      checks++; if (fsel_seen[k] == 0) begin failures++; $display("filter %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] step_at_fall;
endmodule
