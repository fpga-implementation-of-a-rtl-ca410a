// fir_interp: interpolate-by-L raised-cosine pulse-shaping filter (complex).
//
// Works as a polyphase interpolator at one output sample per clock.  A new
// symbol is shifted into a SPAN-deep delay line once every L cycles; in
// between, a phase counter p = 0 .. L-1 selects polyphase branch p and the
// output is  y = sum_k h[p + k*L] * x[k]  (x[0] newest), which is the same
// as zero-stuffing the symbols by L and running the full SPAN*L-tap filter.
// Taps are raised-cosine values (roll-off BETA) in 16_12 computed at
// elaboration, peak 1.0, so the symbol instants pass at unity gain.
//
// Interface: req is high one cycle before the symbol shift (phase L-2), so
// a source that loads a register on req presents the new symbol in time.
// The filtered sample is registered (latency 1 from the phase it belongs
// to), rounded to 16_12 and saturated.
//
// Interpolating raised-cosine filtering with 16-bit coefficients follows the
// document; the polyphase structure, span and roll-off are this design's
// choices (the document uses a vendor FIR core and gives neither value).
module fir_interp
  import rasg_pkg::*;
#(
  parameter int  L    = 10,
  parameter int  SPAN = 8,
  parameter real BETA = 0.25
) (
  input  logic  clk,
  input  logic  rst,
  input  samp_t in_i,
  input  samp_t in_q,
  output logic  req,
  output samp_t out_i,
  output samp_t out_q
);

  localparam int NTAPS = SPAN * L;
  localparam int ACC_W = 2 * SAMP_W + $clog2(SPAN) + 1;
  typedef samp_t taps_t [NTAPS];

  function automatic taps_t build_taps();
    taps_t t;
    for (int n = 0; n < NTAPS; n++) t[n] = rc_tap(n, L, SPAN, BETA);
    return t;
  endfunction

  localparam taps_t TAPS = build_taps();

  logic [$clog2(L)-1:0] ph;
  samp_t                xi [SPAN];
  samp_t                xq [SPAN];
  logic signed [ACC_W-1:0] acc_i, acc_q;

  assign req = (ph == ($clog2(L))'(L - 2));

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0;
      for (int k = 0; k < SPAN; k++) begin
        xi[k] <= '0;
        xq[k] <= '0;
      end
    end else if (ph == ($clog2(L))'(L - 1)) begin
      ph    <= '0;
      xi[0] <= in_i;
      xq[0] <= in_q;
      for (int k = 1; k < SPAN; k++) begin
        xi[k] <= xi[k-1];
        xq[k] <= xq[k-1];
      end
    end else begin
      ph <= ph + 1'b1;
    end
  end

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < SPAN; k++) begin
      acc_i = acc_i + ACC_W'(xi[k]) * ACC_W'(TAPS[int'(ph) + k * L]);
      acc_q = acc_q + ACC_W'(xq[k]) * ACC_W'(TAPS[int'(ph) + k * L]);
    end
  end

  // Round to 16_12 and saturate.
  function automatic samp_t to_samp(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] r;
    r = (a + ACC_W'(1 << (SAMP_F - 1))) >>> SAMP_F;
    if (r > ACC_W'(32767))       return samp_t'(16'sh7fff);
    else if (r < -ACC_W'(32768)) return samp_t'(16'sh8000);
    else                         return samp_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_i <= to_samp(acc_i);
      out_q <= to_samp(acc_q);
    end
  end

endmodule
