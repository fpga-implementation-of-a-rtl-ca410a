// freq_gen_mixer_tb: self-checking test of the frequency generator and mixer.
//
// Runs with a 6-cycle burst clock.  Random filtered samples drive the
// mixer.  A model phase accumulator follows the reported on/step outputs;
// every output sample must equal
//   gain(power) * (X * exp(j*2*pi*phase/256))  with gain = 0.1*max(code,1)
// to within the table quantisation.  Also checked: every offered step is
// in 0..64 or 192..255 and both halves are used; burst edges fall on the
// burst clock; during a burst the output is non-zero; refusals by the
// guard hold the branch off.
module freq_gen_mixer_tb;
  import rasg_pkg::*;
  localparam int TD = 6;
  localparam int NC = 80000;
  logic clk = 0, rst = 1, grant = 0;
  samp_t filt_i = 0, filt_q = 0;
  logic req, on;
  logic [7:0] cand_step, step, power;
  logic [1:0] fsel;
  mix_t sig_i, sig_q;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_bursts = 0, n_refused = 0, n_zero_pow = 0;
  int hfi [NC], hfq [NC], hacc [NC], hpow [NC];

  freq_gen_mixer #(.TICK_DIV(TD)) dut (.clk, .rst, .grant, .filt_i, .filt_q, .req, .cand_step,
                                       .on, .step, .power, .fsel, .sig_i, .sig_q);
  always #5 clk = ~clk;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc_m, last_fall, prev_on;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    acc_m = 0; last_fall = -1; prev_on = 0;
    for (int t = 0; t < NC; t++) begin
      // drive inputs for this cycle
      filt_i = samp_t'($urandom_range(8192) - 4096);
      filt_q = samp_t'($urandom_range(8192) - 4096);
      grant  = (t < NC / 2) ? 1'b1 : ($urandom % 8 == 0);
      hfi[t] = int'(filt_i); hfq[t] = int'(filt_q);
      hacc[t] = acc_m; hpow[t] = int'(power);
      checks++;
      if (!((cand_step <= 8'd64) || (cand_step >= 8'd192))) begin
        failures++; $display("illegal step offered %0d", cand_step);
      end
      if (req && !grant) n_refused++;
      if (on) begin
        if (step >= 1 && step <= 64) n_pos++;
        if (step >= 192) n_neg++;
      end
      if (on) acc_m = (acc_m + int'(step)) % 256;
      @(posedge clk); #1;
      // burst edges
      if (prev_on && !on) begin
        if (last_fall >= 0) begin
          checks++;
          if ((t - last_fall) % TD != 0) begin failures++; $display("fall spacing %0d", t - last_fall); end
        end
        last_fall = t;
      end
      if (!prev_on && on) begin
        n_bursts++;
        if (power == 0) n_zero_pow++;
      end
      prev_on = on;
      // output check: sig(t) from power(t-1), filt(t-2), phase(t-3)
      if (t >= 4) begin
        real g, ph, ei, eq, tol;
        g = 0.1 * real'(hpow[t] == 0 ? 1 : hpow[t]);
        ph = 2.0 * PI * real'(hacc[t - 2]) / 256.0;
        ei = g * (real'(hfi[t - 1]) * $cos(ph) - real'(hfq[t - 1]) * $sin(ph)) / 4096.0;
        eq = g * (real'(hfi[t - 1]) * $sin(ph) + real'(hfq[t - 1]) * $cos(ph)) / 4096.0;
        tol = 0.002 * g + 0.001;
        checks++;
        if (rabs(real'(sig_i) / 16777216.0 - ei) > tol || rabs(real'(sig_q) / 16777216.0 - eq) > tol) begin
          failures++;
          if (failures < 8) $display("t=%0d got %f,%f exp %f,%f", t, real'(sig_i) / 16777216.0, real'(sig_q) / 16777216.0, ei, eq);
        end
      end
    end
    $display("bursts=%0d positive=%0d negative=%0d refused=%0d", n_bursts, n_pos, n_neg, n_refused);
    checks++; if (n_bursts < 20) begin failures++; $display("too few bursts"); end
    checks++; if (n_pos == 0 || n_neg == 0) begin failures++; $display("one frequency half never used"); end
    checks++; if (n_refused == 0) begin failures++; $display("no refusal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
