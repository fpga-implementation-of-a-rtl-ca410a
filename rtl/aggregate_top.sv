// aggregate_top: pseudo-random aggregate spectrum generator.
//
// NB independent random signal branches (three in the reference
// configuration) each emit bursts of random length, centre frequency,
// bandwidth and power.  A co-channel guard keeps the centre frequencies of
// simultaneous bursts more than 32 DDS steps apart.  The branch outputs are
// summed in a registered adder, then one complex AWGN sample (unit
// variance, 10_7, aligned to 32_24) is added in a second registered adder,
// giving the aggregate complex baseband test signal at one sample per
// clock.  With a 1 MHz sample clock the spectrum spans -500 .. +500 kHz,
// bursts last 1 .. 255 ms, and signal-to-noise ratios range over 0.1 .. 25.5
// in amplitude against the noise.
//
// Interface: clk is the sample clock; rst is synchronous and must be held
// for at least 4 cycles.  real_out/imag_out are 32_24.  The br_* outputs
// report each branch's current burst (on, step, power code, filter select)
// as a ground-truth record; step s means a centre frequency of
// s*Fs/256 for s < 128 and (s-256)*Fs/256 otherwise.  Latency from the
// branch outputs to real_out/imag_out is 2 cycles.
//
// The branch structure, the single AWGN source after the branch sum, the
// co-channel step comparison and the 32_24 output follow the document.
// The ground-truth outputs and the seed derivation are this design's own.
module aggregate_top
  import rasg_pkg::*;
#(
  parameter int NB           = 3,
  parameter int OUT_W        = 32,
  parameter int OUT_F        = 24,
  parameter int TICK_DIV     = 1000,
  parameter bit GUARD_EN     = 1'b1,
  parameter int MIN_STEP_SEP = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  output logic signed [OUT_W-1:0] real_out,
  output logic signed [OUT_W-1:0] imag_out,
  output logic [NB-1:0]           br_on,
  output logic [7:0]              br_step  [NB],
  output logic [7:0]              br_power [NB],
  output logic [1:0]              br_fsel  [NB]
);

  localparam int NOISE_W = 10;
  localparam int NOISE_F = 7;

  logic [NB-1:0] req, grant;
  logic [7:0]    cand_step [NB];
  mix_t          sig_i [NB];
  mix_t          sig_q [NB];

  for (genvar b = 0; b < NB; b++) begin : g_br
    signal_branch #(.BRANCH_ID(b), .TICK_DIV(TICK_DIV)) u_br (
      .clk, .rst,
      .grant(grant[b]), .req(req[b]), .cand_step(cand_step[b]),
      .on(br_on[b]), .step(br_step[b]), .power(br_power[b]), .fsel(br_fsel[b]),
      .sig_i(sig_i[b]), .sig_q(sig_q[b])
    );
  end

  cochannel_guard #(.NB(NB), .MIN_STEP_SEP(MIN_STEP_SEP), .GUARD_EN(GUARD_EN)) u_guard (
    .req, .cand_step, .on(br_on), .cur_step(br_step), .grant
  );

  logic signed [NOISE_W-1:0] noise_i, noise_q;

  awgn_gen #(.NOISE_W(NOISE_W), .NOISE_F(NOISE_F)) u_awgn (
    .clk, .rst, .noise_i, .noise_q
  );

  // Align a 32_24 branch sample or a 10_7 noise sample to OUT_W_OUT_F.
  function automatic logic signed [OUT_W-1:0] from_mix(input mix_t v);
    if (OUT_F >= MIX_F) return OUT_W'(v) <<< (OUT_F - MIX_F);
    else                return OUT_W'(v >>> (MIX_F - OUT_F));
  endfunction

  function automatic logic signed [OUT_W-1:0] from_noise(input logic signed [NOISE_W-1:0] v);
    return OUT_W'(v) <<< (OUT_F - NOISE_F);
  endfunction

  logic signed [OUT_W-1:0] sum_i, sum_q, nz_i, nz_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_i    <= '0;
      sum_q    <= '0;
      nz_i     <= '0;
      nz_q     <= '0;
      real_out <= '0;
      imag_out <= '0;
    end else begin
      logic signed [OUT_W-1:0] ai, aq;
      ai = '0;
      aq = '0;
      for (int b = 0; b < NB; b++) begin
        ai = ai + from_mix(sig_i[b]);
        aq = aq + from_mix(sig_q[b]);
      end
      sum_i    <= ai;
      sum_q    <= aq;
      nz_i     <= from_noise(noise_i);
      nz_q     <= from_noise(noise_q);
      real_out <= sum_i + nz_i;
      imag_out <= sum_q + nz_q;
    end
  end

endmodule
