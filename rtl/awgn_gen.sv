// awgn_gen: complex additive white Gaussian noise source.
//
// Each rail (I and Q) sums four independent Box-Muller generators through
// a two-level registered adder tree; by the central-limit effect the sum is
// closer to Gaussian than one table-based sample.  The sum of four unit-
// variance samples is halved to return to unit variance and saturated to
// 10_7 (three integer bits, seven fractional: range -4 .. +3.99), the
// smallest format that passed the normality tests the design was sized by.
//
// Interface: rst reloads all eight LFSR seeds; a new complex sample leaves
// every cycle, 5 cycles after reset is released (2 in the Box-Muller
// units, 2 in the adder tree, 1 in the output register).
//
// Four Box-Muller units per rail, the registered adder tree, unit-variance
// normalisation and the 10_7 output follow the document; the document uses
// a vendor noise core whose insides it does not give, so the Box-Muller
// units themselves are this design's own.
module awgn_gen #(
  parameter int          NOISE_W = 10,
  parameter int          NOISE_F = 7,
  parameter logic [46:0] SEED    = 47'h2F0F_1234_ABCD
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic signed [NOISE_W-1:0] noise_i,
  output logic signed [NOISE_W-1:0] noise_q
);

  localparam int N_BM = 4;
  localparam logic signed [13:0] MAXV = 14'((1 << (NOISE_W - 1)) - 1);
  localparam logic signed [13:0] MINV = -14'(1 << (NOISE_W - 1));

  logic signed [11:0] bm    [2][N_BM];
  logic signed [13:0] s_lo  [2];
  logic signed [13:0] s_hi  [2];
  logic signed [13:0] s_all [2];

  function automatic logic signed [NOISE_W-1:0] sat(input logic signed [13:0] v);
    logic signed [13:0] h;
    // halve with rounding, then convert 7 fractional bits to NOISE_F
    h = (v + 14'sd1) >>> 1;
    if (NOISE_F > 7)      h = h <<< (NOISE_F - 7);
    else if (NOISE_F < 7) h = h >>> (7 - NOISE_F);
    if (h > MAXV)      return MAXV[NOISE_W-1:0];
    else if (h < MINV) return MINV[NOISE_W-1:0];
    else               return h[NOISE_W-1:0];
  endfunction

  for (genvar r = 0; r < 2; r++) begin : g_rail
    for (genvar b = 0; b < N_BM; b++) begin : g_bm
      box_muller #(
        .SEED(SEED ^ (47'(r * N_BM + b + 1) * 47'h0009_E377_9B97))
      ) u_bm (.clk, .rst, .bm(bm[r][b]));
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        s_lo[r]  <= '0;
        s_hi[r]  <= '0;
        s_all[r] <= '0;
      end else begin
        s_lo[r]  <= 14'(bm[r][0]) + 14'(bm[r][1]);
        s_hi[r]  <= 14'(bm[r][2]) + 14'(bm[r][3]);
        s_all[r] <= s_lo[r] + s_hi[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      noise_i <= '0;
      noise_q <= '0;
    end else begin
      noise_i <= sat(s_all[0]);
      noise_q <= sat(s_all[1]);
    end
  end

endmodule
