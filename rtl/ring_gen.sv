// ring_gen: ring generator of the RNS PRNG.
//
// Produces a 10-bit index that walks the residues 0 .. PRIME-1 of one prime
// field.  Each cycle a multiplexer picks, by command, the current index
// plus 0, plus 1, plus 2, or the jam (seed) value; if the pick is >= PRIME,
// PRIME is subtracted so the index wraps, and the result is registered.
//
// Interface: cmd (RG_HOLD / RG_STEP1 / RG_STEP2 / RG_JAM), jam value, and
// the registered index.  One cycle from command to index.
//
// The structure (four-input multiplexer of +0/+1/+2/jam, compare with the
// prime, conditional subtract, output register) follows the document's
// ring generator.  The document has no reset on the ring itself; the
// parent jams the seed to initialise it.
//
// The top bit of the wrapped sum is always 0 (the result is < PRIME) and
// is dropped on purpose.
module ring_gen
  import rasg_pkg::*;
#(
  parameter int unsigned PRIME = 857,
  parameter int          IDX_W = 10
) (
  input  logic             clk,
  input  rg_cmd_e          cmd,
  input  logic [IDX_W-1:0] jam,
  output logic [IDX_W-1:0] idx
);

  logic [IDX_W:0] pick, wrapped;

  always_comb begin
    unique case (cmd)
      RG_HOLD:  pick = {1'b0, idx};
      RG_STEP1: pick = {1'b0, idx} + (IDX_W+1)'(1);
      RG_STEP2: pick = {1'b0, idx} + (IDX_W+1)'(2);
      RG_JAM:   pick = {1'b0, jam};
      default:  pick = {1'b0, idx};
    endcase
    wrapped = (pick >= (IDX_W+1)'(PRIME)) ? pick - (IDX_W+1)'(PRIME) : pick;
  end

  always_ff @(posedge clk) idx <= wrapped[IDX_W-1:0];

endmodule
