// freq_gen_mixer: random frequency generator, burst timing and complex mixer.
//
// Four leap-forward LFSR generators draw, every cycle, a frequency step, a
// burst length, a power code and a filter select.  The burst controller
// (burst_ctrl) takes them at each burst boundary, paced by a 1 kHz tick
// divided down from the sample clock.  The frequency step is first
// restricted to the alias-free range of the 256-entry sine table: steps
// 65..127 lose 64 and steps 128..191 gain 64, so every step lies in 0..64
// (0 .. +Fs/4) or 192..255 (-Fs/4 .. 0), uniformly.  While the burst is on
// an 8-bit phase accumulator adds the step every cycle and addresses the
// cosine and sine tables (16_12); the filtered symbols X are mixed with
// Y = cos + j*sin:
//     P_I = X_I*cos - X_Q*sin,   P_Q = X_I*sin + X_Q*cos     (32_24)
// and the product is scaled by the burst's power code: gain = 0.1 * code
// (code 0 counts as 1), i.e. 0.1 .. 25.5 against unit-variance noise.
// The step is f = step * Fs / 256 (3.90625 kHz per step at Fs = 1 MHz).
//
// Interface: cand_step/req/grant go to the co-channel guard; on, step,
// power and fsel are the current burst's parameters (fsel drives the
// filter bank, on drives the symbol gate); sig_i/sig_q are the 32_24
// branch output.  Latency filt -> sig is 2 cycles; the table read adds one
// cycle between the accumulator and the mixer.
//
// Table-based sine generation, the accumulator, the restriction mapping,
// the 1 kHz burst clock, the four uniform generators and the 32_24 mixer
// follow the document.  The document prints P_Q with a minus sign; the
// complex product (plus) is used here because only it shifts the
// spectrum.  The 0.1-per-code gain constant (410/4096) and the bit slices
// are this design's reading.
//
// Only the two low bits of the filter-select generator are used; its other
// six bits are left unused on purpose.
module freq_gen_mixer
  import rasg_pkg::*;
#(
  parameter int          TICK_DIV  = 1000,
  parameter logic [46:0] SEED_BASE = 47'h1234_5678_9AB
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       grant,
  input  samp_t      filt_i,
  input  samp_t      filt_q,
  output logic       req,
  output logic [7:0] cand_step,
  output logic       on,
  output logic [7:0] step,
  output logic [7:0] power,
  output logic [1:0] fsel,
  output mix_t       sig_i,
  output mix_t       sig_q
);

  localparam int DEPTH  = 256;
  localparam int GAIN_A = 410;        // 0.1 in Q.12

  typedef samp_t tab_t [DEPTH];

  function automatic tab_t build_sine(input int quarter);
    tab_t t;
    for (int k = 0; k < DEPTH; k++) t[k] = sine_val(k + quarter, DEPTH);
    return t;
  endfunction

  localparam tab_t SIN_TAB = build_sine(0);
  localparam tab_t COS_TAB = build_sine(DEPTH / 4);

  // Map a raw step into 0..64 or 192..255.
  function automatic logic [7:0] restrict_step(input logic [7:0] s);
    if (s >= 8'd65 && s <= 8'd127)       return s - 8'd64;
    else if (s >= 8'd128 && s <= 8'd191) return s + 8'd64;
    else                                 return s;
  endfunction

  // ---- burst clock ----
  logic [$clog2(TICK_DIV)-1:0] div;
  logic                        tick;

  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else     div <= (div == ($clog2(TICK_DIV))'(TICK_DIV - 1)) ? '0 : div + 1'b1;
  end
  assign tick = (div == ($clog2(TICK_DIV))'(TICK_DIV - 1));

  // ---- uniform generators ----
  logic [7:0] r_freq, r_time, r_pow, r_coef;

  lfsr_urng #(.OUT_BITS(8), .SEED(SEED_BASE ^ 47'h0000_0000_0F1)) u_rng_freq (.clk, .rst, .en(1'b1), .rnd(r_freq));
  lfsr_urng #(.OUT_BITS(8), .SEED(SEED_BASE ^ 47'h0A5A_0000_F00)) u_rng_time (.clk, .rst, .en(1'b1), .rnd(r_time));
  lfsr_urng #(.OUT_BITS(8), .SEED(SEED_BASE ^ 47'h5000_3C3C_00F)) u_rng_pow  (.clk, .rst, .en(1'b1), .rnd(r_pow));
  lfsr_urng #(.OUT_BITS(8), .SEED(SEED_BASE ^ 47'h00FF_0000_1E1)) u_rng_coef (.clk, .rst, .en(1'b1), .rnd(r_coef));

  assign cand_step = restrict_step(r_freq);

  burst_ctrl u_burst (
    .clk, .rst, .tick,
    .freq_in(cand_step), .time_in(r_time), .power_in(r_pow), .coeff_in(r_coef[1:0]),
    .grant, .req,
    .signal_out(on), .freq_out(step), .power_out(power), .coeff_out(fsel)
  );

  // ---- DDS ----
  logic [7:0] acc;
  samp_t      cos_q, sin_q;

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (on) acc <= acc + step;
  end

  always_ff @(posedge clk) begin
    cos_q <= COS_TAB[acc];
    sin_q <= SIN_TAB[acc];
  end

  // ---- complex mixer, then power scaling ----
  mix_t p_i, p_q;
  logic [17:0] gain;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_i <= '0;
      p_q <= '0;
    end else begin
      p_i <= mix_t'(filt_i) * mix_t'(cos_q) - mix_t'(filt_q) * mix_t'(sin_q);
      p_q <= mix_t'(filt_i) * mix_t'(sin_q) + mix_t'(filt_q) * mix_t'(cos_q);
    end
  end

  assign gain = 18'((power == 8'd0) ? 8'd1 : power) * 18'(GAIN_A);

  always_ff @(posedge clk) begin
    if (rst) begin
      sig_i <= '0;
      sig_q <= '0;
    end else begin
      sig_i <= mix_t'((52'(signed'(p_i)) * 52'(signed'({1'b0, gain}))) >>> SAMP_F);
      sig_q <= mix_t'((52'(signed'(p_q)) * 52'(signed'({1'b0, gain}))) >>> SAMP_F);
    end
  end

endmodule
