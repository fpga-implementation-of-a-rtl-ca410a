// cochannel_guard: keeps simultaneous bursts out of each other's band.
//
// A branch that wants to start a burst offers its random DDS step.  The
// steps are compared as signed frequencies (step < 128 is positive, else
// step - 256; one step = Fs/256).  The offer is granted only if it is more
// than MIN_STEP_SEP steps away from the step of every other branch that is
// currently on, and from the offer of every lower-numbered branch that is
// requesting in the same cycle.  32 steps = 125 kHz at Fs = 1 MHz, the
// largest symbol rate the document assumes, so centre frequencies of
// active signals stay at least that far apart (bursts on the 167 ksps
// filter can still touch at their edges; MIN_STEP_SEP = 43 would separate
// those too).  With GUARD_EN = 0 every request is granted (co-channel
// signals allowed).
//
// Interface: purely combinational; grant[b] is meaningful while req[b].
//
// The comparison of step values against a 32-step spacing follows the
// document.  The signed-frequency distance, the priority between
// simultaneous requests and the retry on refusal (in burst_ctrl) are this
// design's choices.
module cochannel_guard #(
  parameter int NB           = 3,
  parameter int MIN_STEP_SEP = 32,
  parameter bit GUARD_EN     = 1'b1
) (
  input  logic [NB-1:0] req,
  input  logic [7:0]    cand_step [NB],
  input  logic [NB-1:0] on,
  input  logic [7:0]    cur_step  [NB],
  output logic [NB-1:0] grant
);

  function automatic int sfreq(input logic [7:0] s);
    return int'(signed'(s));
  endfunction

  function automatic logic too_close(input logic [7:0] a, input logic [7:0] b);
    int d;
    d = sfreq(a) - sfreq(b);
    if (d < 0) d = -d;
    return d <= MIN_STEP_SEP;
  endfunction

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      grant[b] = req[b];
      if (GUARD_EN) begin
        for (int j = 0; j < NB; j++) begin
          if (j != b && on[j] && too_close(cand_step[b], cur_step[j])) grant[b] = 1'b0;
          if (j < b && req[j] && too_close(cand_step[b], cand_step[j])) grant[b] = 1'b0;
        end
      end
    end
  end

endmodule
