// aggregate_check.svh: checking body shared by the aggregate_top testbenches.
//
// Expects in the including module: localparams NCYC (cycles to run) and
// REQUIRE_ALL (1: every mechanism must occur), and an aggregate_top
// instance named dut with its default NB = 3 and 32_24 output, driven by
// clk/rst declared here.
//
// Checks every cycle that real_out/imag_out equal the sum of the branch
// outputs plus the AWGN sample, aligned to 32_24, two cycles later; that
// two branches on at once are more than 32 steps apart; and that a refused
// branch does not start.  Counts the mechanisms of the design.

  localparam int NBR = 3;
  logic clk = 0, rst = 1;
  logic signed [31:0] real_out, imag_out;
  logic [NBR-1:0]     br_on;
  logic [7:0]         br_step  [NBR];
  logic [7:0]         br_power [NBR];
  logic [1:0]         br_fsel  [NBR];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // mechanism counters
  int n_burst [NBR];
  int n_fsel [4];
  int n_refused = 0, n_remap = 0, n_overlap = 0, n_all_on = 0;
  int n_neg = 0, n_pos = 0, n_zero_pow = 0, n_noise_sat = 0, n_long_off = 0;

  function automatic int sdist(input logic [7:0] a, input logic [7:0] b);
    int d;
    d = int'(signed'(a)) - int'(signed'(b));
    return d < 0 ? -d : d;
  endfunction

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #(64'd10 * NCYC + 64'd100000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_i [3], exp_q [3];
    logic [NBR-1:0] prev_on;
    int off_len [NBR];
    repeat (5) @(posedge clk);
    #1 rst = 0;
    prev_on = '0;
    for (int b = 0; b < NBR; b++) off_len[b] = 0;
    for (int k = 0; k < 3; k++) begin exp_i[k] = 0; exp_q[k] = 0; end
    for (int t = 0; t < NCYC; t++) begin
      longint si, sq;
      // independent output model from the branch and noise outputs
      si = longint'(dut.noise_i) * 131072;
      sq = longint'(dut.noise_q) * 131072;
      si += longint'(dut.g_br[0].u_br.sig_i) + longint'(dut.g_br[1].u_br.sig_i) + longint'(dut.g_br[2].u_br.sig_i);
      sq += longint'(dut.g_br[0].u_br.sig_q) + longint'(dut.g_br[1].u_br.sig_q) + longint'(dut.g_br[2].u_br.sig_q);
      // wrap to 32 bits as the hardware does
      si = longint'(32'(si)); if (si >= 64'sd2147483648) si -= 64'sd4294967296;
      sq = longint'(32'(sq)); if (sq >= 64'sd2147483648) sq -= 64'sd4294967296;
      // mechanisms and guard rule, sampled before the clock edge
      for (int b = 0; b < NBR; b++) begin
        if (dut.req[b] && !dut.grant[b]) n_refused++;
        if (dut.req[b] && dut.grant[b]) begin
          logic [7:0] raw;
          raw = (b == 0) ? dut.g_br[0].u_br.u_fgm.r_freq :
                (b == 1) ? dut.g_br[1].u_br.u_fgm.r_freq : dut.g_br[2].u_br.u_fgm.r_freq;
          if (raw >= 8'd65 && raw <= 8'd191) n_remap++;
        end
        for (int j = b + 1; j < NBR; j++)
          if (br_on[b] && br_on[j]) begin
            checks++;
            if (sdist(br_step[b], br_step[j]) <= 32) begin
              failures++;
              $display("t=%0d branches %0d,%0d on at steps %0d,%0d", t, b, j, br_step[b], br_step[j]);
            end
          end
      end
      if ($countones(br_on) >= 2) n_overlap++;
      if (&br_on) n_all_on++;
      if (dut.noise_i == -10'sd512 || dut.noise_i == 10'sd511) n_noise_sat++;
      @(posedge clk); #1;
      exp_i[2] = exp_i[1]; exp_q[2] = exp_q[1];
      exp_i[1] = si;       exp_q[1] = sq;
      if (t >= 2) begin
        checks++;
        if (longint'(real_out) != exp_i[2] || longint'(imag_out) != exp_q[2]) begin
          failures++;
          if (failures < 8) $display("t=%0d out %0d,%0d want %0d,%0d", t, real_out, imag_out, exp_i[2], exp_q[2]);
        end
      end
      for (int b = 0; b < NBR; b++) begin
        if (br_on[b] && !prev_on[b]) begin
          n_burst[b]++;
          n_fsel[br_fsel[b]]++;
          if (br_step[b] >= 8'd192) n_neg++;
          else if (br_step[b] != 0) n_pos++;
          if (br_power[b] == 0) n_zero_pow++;
          if (off_len[b] > 100 * TICKS) n_long_off++;
          off_len[b] = 0;
        end
        if (!br_on[b]) off_len[b]++;
      end
      prev_on = br_on;
    end
    $display("mechanisms over %0d cycles:", NCYC);
    for (int b = 0; b < NBR; b++) need($sformatf("bursts of branch %0d", b), n_burst[b]);
    need("two or more branches on", n_overlap);
    need("positive-frequency bursts", n_pos);
    need("negative-frequency bursts", n_neg);
    need("step restriction remaps", n_remap);
    need("off gaps > 100 ticks", n_long_off);
    if (REQUIRE_ALL) begin
      for (int k = 0; k < 4; k++) need($sformatf("bursts with filter %0d", k), n_fsel[k]);
      need("guard refusals (cycles)", n_refused);
      need("all three branches on", n_all_on);
      need("noise at saturation", n_noise_sat);
    end else begin
      $display("  filters used %0d %0d %0d %0d, refusals %0d, all-on cycles %0d, noise saturations %0d",
               n_fsel[0], n_fsel[1], n_fsel[2], n_fsel[3], n_refused, n_all_on, n_noise_sat);
    end
    $display("  zero power-code bursts       %0d", n_zero_pow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
