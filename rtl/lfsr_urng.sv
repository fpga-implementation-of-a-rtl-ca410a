// lfsr_urng: leap-forward LFSR uniform random generator.
//
// A 47-bit Fibonacci LFSR with the primitive feedback polynomial
// x^47 + x^5 + 1 (period 2^47 - 1) is advanced OUT_BITS steps in one clock,
// so every enabled cycle yields OUT_BITS fresh bits rather than one.  The
// output is the OUT_BITS most recently shifted-in bits, i.e. the low bits
// of the state register.
//
// Interface: rst (synchronous) loads SEED; en advances the register by
// OUT_BITS steps; rnd is valid from the cycle after reset and changes on
// every enabled cycle.
//
// The eight-bit leap, the order-47 polynomial and the role as the
// "uniform random generator" of the frequency, duration, power and filter
// choices follow the document.  The particular trinomial and the Fibonacci
// form are this design's choice: the document names only the order.
module lfsr_urng #(
  parameter int          OUT_BITS = 8,
  parameter logic [46:0] SEED     = 47'h1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  output logic [OUT_BITS-1:0] rnd
);

  localparam int LFSR_W = 47;

  logic [LFSR_W-1:0] state, nxt;

  // OUT_BITS single-bit steps unrolled into one combinational leap.
  always_comb begin
    nxt = state;
    for (int k = 0; k < OUT_BITS; k++) begin
      nxt = {nxt[LFSR_W-2:0], nxt[LFSR_W-1] ^ nxt[4]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     state <= (SEED[LFSR_W-1:0] == '0) ? LFSR_W'(1) : SEED[LFSR_W-1:0];
    else if (en) state <= nxt;
  end

  assign rnd = state[OUT_BITS-1:0];

endmodule
