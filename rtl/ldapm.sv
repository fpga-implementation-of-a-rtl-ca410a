// ldapm: linear digital amplitude-phase modulator (random symbol source).
//
// Two independent RNS PRNGs supply random bits for the in-phase and the
// quadrature rail.  BITS_PER_RAIL bits of each address a level table of a
// square constellation (1 bit per rail = QPSK, 2 = 16-QAM, 3 = 64-QAM),
// scaled to unit average symbol power in 16_12 (QPSK: +-2896/4096).  The
// symbol is forced to zero while the burst is off, which is the on/off
// gating applied before the pulse-shaping filters so that bursts start and
// stop without a spectral splash.
//
// Interface: next is the filter's request for a new symbol; on the cycle
// next is high the symbol registers load a new symbol (or zero when on is
// low) and both PRNGs are told to advance, so the following request finds
// a fresh PRNG value.  sym_i / sym_q are registered and hold between
// requests.  Requests must be at least 4 cycles apart (the PRNG latency);
// the slowest filter asks every 6 cycles.
//
// Random bits per rail, a table lookup per rail, the 16_12 format and the
// gating follow the document; the document's reported system draws these
// bits from the RNS PRNG.  Which bits are sliced and the level scaling are
// this design's choice.
//
// Unused on purpose: the PRNGs' data_valid and count outputs (the fixed
// request spacing already guarantees a fresh value) and the PRNG bits
// above BITS_PER_RAIL.
module ldapm
  import rasg_pkg::*;
#(
  parameter int        BITS_PER_RAIL = 1,
  parameter u32_arr8_t SEEDS_I       = PRNG_SEEDS,
  parameter u32_arr8_t SEEDS_Q       = '{101, 202, 303, 404, 505, 606, 707, 808}
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  on,
  input  logic  next,
  output samp_t sym_i,
  output samp_t sym_q
);

  localparam int NLEV = 1 << BITS_PER_RAIL;
  typedef samp_t lev_t [NLEV];

  function automatic lev_t build_levels();
    lev_t t;
    for (int k = 0; k < NLEV; k++) t[k] = pam_level(k, BITS_PER_RAIL);
    return t;
  endfunction

  localparam lev_t LEVELS = build_levels();

  logic [7:0]  rnd_i, rnd_q;
  logic        dv_i, dv_q;
  logic [31:0] cnt_i, cnt_q;

  rns_prng #(.SEEDS(SEEDS_I)) u_prng_i (
    .clk, .enable(next), .reset(rst), .skip(1'b0),
    .prng_out(rnd_i), .data_valid(dv_i), .count(cnt_i)
  );

  rns_prng #(.SEEDS(SEEDS_Q)) u_prng_q (
    .clk, .enable(next), .reset(rst), .skip(1'b0),
    .prng_out(rnd_q), .data_valid(dv_q), .count(cnt_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sym_i <= '0;
      sym_q <= '0;
    end else if (next) begin
      sym_i <= on ? LEVELS[rnd_i[BITS_PER_RAIL-1:0]] : '0;
      sym_q <= on ? LEVELS[rnd_q[BITS_PER_RAIL-1:0]] : '0;
    end
  end

endmodule
