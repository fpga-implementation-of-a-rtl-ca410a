// rasg_pkg: types, fixed-point formats and elaboration-time table builders
// shared by the random aggregate spectrum generator.
//
// Fixed-point formats are written W_F (W total bits, F fractional bits):
//   symbols, filter outputs, sine/cosine : 16_12
//   mixer and final aggregate output     : 32_24
//   Gaussian noise                       : 10_7
// All tables (sine, raised-cosine taps, Box-Muller transforms, CRT residues,
// constellation levels) are computed here from their formulas at elaboration,
// so no data files are needed.
package rasg_pkg;

  localparam int SAMP_W = 16;   // symbol / filter / LUT sample width
  localparam int SAMP_F = 12;   // fractional bits of the above
  localparam int MIX_W  = 32;   // mixer product width
  localparam int MIX_F  = 24;   // fractional bits of the above

  typedef logic signed [SAMP_W-1:0] samp_t;
  typedef logic signed [MIX_W-1:0]  mix_t;

  // Ring generator command (RG_Command of the RNS PRNG).
  typedef enum logic [1:0] {
    RG_HOLD  = 2'd0,
    RG_STEP1 = 2'd1,
    RG_STEP2 = 2'd2,
    RG_JAM   = 2'd3
  } rg_cmd_e;

  // Primes and seeds of the RNS PRNG.
  typedef int unsigned u32_arr8_t [8];
  localparam u32_arr8_t PRNG_PRIMES = '{857, 859, 877, 887, 907, 911, 919, 929};
  localparam u32_arr8_t PRNG_SEEDS  = '{330, 69, 759, 386, 156, 3, 599, 343};

  localparam real PI = 3.14159265358979323846;

  // Round a real to the nearest integer.
  function automatic int rnd(input real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  // sin(2*pi*k/depth) in 16_12.
  function automatic samp_t sine_val(input int k, input int depth);
    return samp_t'(rnd($sin(2.0 * PI * real'(k) / real'(depth)) * real'(1 << SAMP_F)));
  endfunction

  // Raised-cosine impulse response at t symbols, roll-off beta.
  function automatic real rc_val(input real t, input real beta);
    real s, c, d;
    if (t == 0.0) return 1.0;
    s = $sin(PI * t) / (PI * t);
    d = 1.0 - (2.0 * beta * t) * (2.0 * beta * t);
    if (d > -1.0e-9 && d < 1.0e-9) return (PI / 4.0) * ($sin(PI / (2.0 * beta)) / (PI / (2.0 * beta)));
    c = $cos(PI * beta * t) / d;
    return s * c;
  endfunction

  // Tap n (0..span*l-1) of an interpolate-by-l raised-cosine filter, 16_12.
  // The peak sits at n = span*l/2 so symbol instants pass at unity gain.
  function automatic samp_t rc_tap(input int n, input int l, input int span, input real beta);
    real t;
    t = (real'(n) - real'(span * l / 2)) / real'(l);
    return samp_t'(rnd(rc_val(t, beta) * real'(1 << SAMP_F)));
  endfunction

  // Level of index k on one rail of a square constellation with 2^bits levels
  // per rail, scaled so the average complex-symbol power is 1.  16_12.
  function automatic samp_t pam_level(input int k, input int bits);
    int  m;
    real amp, scale;
    m = 1 << bits;
    amp = real'(2 * k - (m - 1));
    scale = $sqrt(2.0 * real'(m * m - 1) / 3.0);
    return samp_t'(rnd(amp / scale * real'(1 << SAMP_F)));
  endfunction

  // Modular exponent base^e mod m (small operands).
  function automatic longint unsigned modpow(input longint unsigned base, input longint unsigned e,
                                             input longint unsigned m);
    longint unsigned r, b, x;
    r = 1; b = base % m; x = e;
    while (x != 0) begin
      if (x[0]) r = (r * b) % m;
      b = (b * b) % m;
      x = x >> 1;
    end
    return r;
  endfunction

  // CRT residue table entry for ring i at index x, reduced mod 2^8:
  //   ((M/p_i) * (((M/p_i)^-1 mod p_i) * x mod p_i)) mod 256
  function automatic logic [7:0] crt_entry(input int i, input int x);
    longint unsigned pi_, mp_mod_p, mp_mod_256, inv, t;
    pi_ = longint'(PRNG_PRIMES[i]);
    mp_mod_p = 1; mp_mod_256 = 1;
    for (int j = 0; j < 8; j++) begin
      if (j != i) begin
        mp_mod_p   = (mp_mod_p * longint'(PRNG_PRIMES[j])) % pi_;
        mp_mod_256 = (mp_mod_256 * longint'(PRNG_PRIMES[j])) % 256;
      end
    end
    inv = modpow(mp_mod_p, pi_ - 2, pi_);       // Fermat inverse, p_i prime
    t   = (inv * longint'(x)) % pi_;
    return 8'((mp_mod_256 * t) % 256);
  endfunction

endpackage
