// rns_prng: residue-number-system pseudo-random generator.
//
// Eight ring generators walk the residue rings of the co-prime primes
// 857, 859, 877, 887, 907, 911, 919 and 929.  Each ring index addresses a
// 1024-entry table holding that ring's Chinese-Remainder term reduced mod
// 2^8,  LUT_i[x] = ((M/p_i) * (((M/p_i)^-1 mod p_i) * x mod p_i)) mod 256,
// where M is the product of the primes.  The eight table outputs are summed
// mod 256 to give one uniform byte per advance.  Because the primes are
// co-prime the joint ring state repeats only after M (about 4.04e23) steps.
//
// Interface: enable advances one step, skip advances two, reset jams the
// SEEDS back into the rings (reset has priority, then skip, then enable).
// The three controls are registered first.  Timing: control registered
// (cycle 1), ring index registered (cycle 2), table read registered
// (cycle 3); prng_out is a combinational sum of the table registers.
// data_valid is high in the cycle prng_out first shows the value produced
// by an advance or jam.  count counts advances since reset (debug).
//
// The primes, seeds, ten-bit rings, command set, summation to eight bits,
// input registers, 32-bit counter and data_valid output follow the
// document; the exact table formula (the document's "de-rotation" is not
// detailed), the mapping of enable/reset/skip to commands and the timing of
// data_valid are this design's own.
module rns_prng
  import rasg_pkg::*;
#(
  parameter u32_arr8_t SEEDS = PRNG_SEEDS
) (
  input  logic        clk,
  input  logic        enable,
  input  logic        reset,
  input  logic        skip,
  output logic [7:0]  prng_out,
  output logic        data_valid,
  output logic [31:0] count
);

  localparam int IDX_W = 10;
  localparam int DEPTH = 1 << IDX_W;

  typedef logic [7:0] lut_t [DEPTH];

  // Table of ring i; entries at or above the prime are never addressed.
  function automatic lut_t build_lut(input int i);
    lut_t t;
    for (int x = 0; x < DEPTH; x++)
      t[x] = (x < int'(PRNG_PRIMES[i])) ? crt_entry(i, x) : 8'd0;
    return t;
  endfunction

  logic    en_r, rst_r, skip_r;
  rg_cmd_e cmd;
  logic    adv_d1, adv_d2;

  always_ff @(posedge clk) begin
    en_r   <= enable;
    rst_r  <= reset;
    skip_r <= skip;
  end

  always_comb begin
    if (rst_r)       cmd = RG_JAM;
    else if (skip_r) cmd = RG_STEP2;
    else if (en_r)   cmd = RG_STEP1;
    else             cmd = RG_HOLD;
  end

  logic [7:0] lut_q [8];

  for (genvar g = 0; g < 8; g++) begin : g_ring
    localparam lut_t LUT = build_lut(g);
    logic [IDX_W-1:0] idx;

    ring_gen #(.PRIME(PRNG_PRIMES[g]), .IDX_W(IDX_W)) u_ring (
      .clk (clk),
      .cmd (cmd),
      .jam (IDX_W'(SEEDS[g] % PRNG_PRIMES[g])),
      .idx (idx)
    );

    always_ff @(posedge clk) lut_q[g] <= LUT[idx];
  end

  always_comb begin
    prng_out = '0;
    for (int g = 0; g < 8; g++) prng_out = prng_out + lut_q[g];
  end

  // Counter of advances and the valid strobe, delayed to match the
  // ring (1 cycle) and table (1 cycle) registers.
  always_ff @(posedge clk) begin
    if (rst_r) count <= '0;
    else if (cmd == RG_STEP1 || cmd == RG_STEP2) count <= count + 32'd1;
    adv_d1     <= (cmd != RG_HOLD);
    adv_d2     <= adv_d1;
  end

  assign data_valid = adv_d2;

endmodule
