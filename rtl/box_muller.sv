// box_muller: table-based Box-Muller Gaussian sample generator.
//
// A leap-forward LFSR supplies U_BITS + C_BITS uniform bits per cycle.
// The first U_BITS index the radius table  R(k) = sqrt(-2 ln((k+0.5)/2^U_BITS))
// and the other C_BITS index the angle table  C(j) = cos(2 pi j / 2^C_BITS).
// Their product R*C is one zero-mean, unit-variance, approximately Gaussian
// sample (the tails are cut at R(0), about 3.9 for U_BITS = 10).
//
// Interface: rst reloads the LFSR seed; bm is a new sample every cycle in
// 12_7 (seven fractional bits, range +-16), two cycles after the uniform
// bits (table register, product register).
//
// The Box-Muller transform of uniform LFSR bits follows the document's
// description of its noise source; the table sizes, formats and single-
// cosine form are this design's choices.
module box_muller
  import rasg_pkg::*;
#(
  parameter int          U_BITS = 10,
  parameter int          C_BITS = 8,
  parameter logic [46:0] SEED   = 47'h1
) (
  input  logic                    clk,
  input  logic                    rst,
  output logic signed [11:0]      bm
);

  localparam int NU = 1 << U_BITS;
  localparam int NC = 1 << C_BITS;

  typedef logic [15:0] rtab_t [NU];   // unsigned Q4.12
  typedef samp_t       ctab_t [NC];   // signed 16_12

  function automatic rtab_t build_r();
    rtab_t t;
    for (int k = 0; k < NU; k++)
      t[k] = 16'(rnd($sqrt(-2.0 * $ln((real'(k) + 0.5) / real'(NU))) * real'(1 << SAMP_F)));
    return t;
  endfunction

  function automatic ctab_t build_c();
    ctab_t t;
    for (int j = 0; j < NC; j++) t[j] = sine_val(j + NC / 4, NC);
    return t;
  endfunction

  localparam rtab_t RTAB = build_r();
  localparam ctab_t CTAB = build_c();

  logic [U_BITS+C_BITS-1:0] u;
  logic [15:0]              r_q;
  samp_t                    c_q;
  logic signed [33:0]       prod;

  lfsr_urng #(.OUT_BITS(U_BITS + C_BITS), .SEED(SEED)) u_lfsr (
    .clk, .rst, .en(1'b1), .rnd(u)
  );

  always_ff @(posedge clk) begin
    r_q <= RTAB[u[U_BITS-1:0]];
    c_q <= CTAB[u[U_BITS+C_BITS-1:U_BITS]];
  end

  // Q4.12 * Q.12 = Q.24; round to 7 fractional bits.
  assign prod = signed'({2'b00, r_q}) * 34'(c_q);

  always_ff @(posedge clk) begin
    if (rst) bm <= '0;
    else     bm <= 12'((prod + 34'sd65536) >>> 17);
  end

endmodule
