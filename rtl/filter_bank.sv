// filter_bank: random-bandwidth filter and interpolator.
//
// Four interpolating raised-cosine filters run side by side on the same
// symbol stream with interpolation factors 12, 10, 8 and 6, i.e. nominal
// bandwidths of 1/12, 1/10, 1/8 and 1/6 of the sample rate.  A multiplexer
// driven by the per-burst random filter select picks which filter's output
// (and which filter's symbol request) leaves the block, so each burst gets
// one of four bandwidths.
//
// Interface: fsel picks the filter; data_ready is the selected filter's
// symbol request (see fir_interp: one cycle before it shifts in a symbol);
// filt_i / filt_q are the selected filter's registered 16_12 outputs.
// fsel should change only while the burst is off, as the burst controller
// does, so the newly selected filter starts from a quiet delay line.
//
// The bank of four fixed filters behind a random multiplexer and the four
// bandwidth ratios follow the document; reading each ratio as an
// interpolation factor, and the span and roll-off, are this design's own.
module filter_bank
  import rasg_pkg::*;
#(
  parameter int  L0   = 12,
  parameter int  L1   = 10,
  parameter int  L2   = 8,
  parameter int  L3   = 6,
  parameter int  SPAN = 8,
  parameter real BETA = 0.25
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] fsel,
  input  samp_t      sym_i,
  input  samp_t      sym_q,
  output logic       data_ready,
  output samp_t      filt_i,
  output samp_t      filt_q
);

  typedef int l_arr_t [4];
  localparam l_arr_t LS = '{L0, L1, L2, L3};

  logic  req [4];
  samp_t oi  [4];
  samp_t oq  [4];

  for (genvar g = 0; g < 4; g++) begin : g_fir
    fir_interp #(.L(LS[g]), .SPAN(SPAN), .BETA(BETA)) u_fir (
      .clk, .rst,
      .in_i(sym_i), .in_q(sym_q),
      .req(req[g]), .out_i(oi[g]), .out_q(oq[g])
    );
  end

  always_comb begin
    data_ready = req[fsel];
    filt_i     = oi[fsel];
    filt_q     = oq[fsel];
  end

endmodule
