// signal_branch: one pseudo-random test signal generator.
//
// Chains the three stages of one transmitter: the LDAPM draws random
// constellation symbols, the filter bank shapes and interpolates them with
// one of four randomly selected bandwidths, and the frequency generator
// and mixer shifts the result to a random centre frequency, scales it by a
// random power and gates it into bursts of random length.  Burst on/off
// and filter select run back from the frequency generator to the LDAPM and
// the filter bank; the selected filter's symbol request paces the LDAPM.
//
// Interface: one complex 32_24 sample per clock on sig_i/sig_q.  req,
// cand_step and grant connect to the co-channel guard shared by all
// branches; on, step, power and fsel report the current burst.
// BRANCH_ID only decorrelates the seeds of this branch's generators.
//
// The stage order and the feedback of On/Off and Filter Select follow the
// document's branch diagram; noise is added once, after all branches.
module signal_branch
  import rasg_pkg::*;
#(
  parameter int BRANCH_ID     = 0,
  parameter int TICK_DIV      = 1000,
  parameter int BITS_PER_RAIL = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       grant,
  output logic       req,
  output logic [7:0] cand_step,
  output logic       on,
  output logic [7:0] step,
  output logic [7:0] power,
  output logic [1:0] fsel,
  output mix_t       sig_i,
  output mix_t       sig_q
);

  // Seeds: rotate the ring seeds by the branch number so every PRNG
  // starts at a different point of its period.
  function automatic u32_arr8_t branch_seeds(input int salt);
    u32_arr8_t s;
    for (int g = 0; g < 8; g++)
      s[g] = (PRNG_SEEDS[g] + 32'(salt) * 32'(97 + 13 * g)) % PRNG_PRIMES[g];
    return s;
  endfunction

  localparam u32_arr8_t SEEDS_I = branch_seeds(2 * BRANCH_ID);
  localparam u32_arr8_t SEEDS_Q = branch_seeds(2 * BRANCH_ID + 1);
  localparam logic [46:0] LFSR_SEED = 47'h1234_5678_9AB ^ (47'(BRANCH_ID) * 47'h0F0F_3C3C_5A5A);

  samp_t sym_i, sym_q, filt_i, filt_q;
  logic  data_ready;

  ldapm #(.BITS_PER_RAIL(BITS_PER_RAIL), .SEEDS_I(SEEDS_I), .SEEDS_Q(SEEDS_Q)) u_ldapm (
    .clk, .rst, .on, .next(data_ready), .sym_i, .sym_q
  );

  filter_bank u_filter (
    .clk, .rst, .fsel, .sym_i, .sym_q, .data_ready, .filt_i, .filt_q
  );

  freq_gen_mixer #(.TICK_DIV(TICK_DIV), .SEED_BASE(LFSR_SEED)) u_fgm (
    .clk, .rst, .grant, .filt_i, .filt_q,
    .req, .cand_step, .on, .step, .power, .fsel, .sig_i, .sig_q
  );

endmodule
