// burst_ctrl: random burst timing and parameter latch ("black box").
//
// Counts ticks of the slow burst clock (1 kHz in the reference
// configuration) up to a randomly drawn maximum of 1..255 ticks, then
// toggles the burst on/off output.  Every period, on or off, draws its own
// length from time_in.  When an off period ends the controller requests a
// new burst and offers the random step on freq_in to the co-channel guard;
// on grant it turns on and latches the step, power code, filter select and
// burst length.  While the guard refuses, it stays off and re-offers the
// next cycle's random step.
//
// Interface: tick is a one-cycle count enable; req is high while a burst
// start is pending and grant is honoured only then; all outputs are
// registered and change only at a toggle.  A drawn length of 0 counts as 1
// tick, giving periods of 1 to 255 ticks (1 ms to 255 ms at 1 kHz).  After
// reset the output is off and the first burst is requested at the first
// tick.
//
// Tick counting to a random maximum, toggling, and latching a fresh length,
// frequency, power and filter select per burst follow the document.  The
// request/grant retry for co-channel protection, the zero-length rule and
// the reset state are this design's choices.
module burst_ctrl #(
  parameter int CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [7:0]       freq_in,
  input  logic [CNT_W-1:0] time_in,
  input  logic [7:0]       power_in,
  input  logic [1:0]       coeff_in,
  input  logic             grant,
  output logic             req,
  output logic             signal_out,
  output logic [7:0]       freq_out,
  output logic [7:0]       power_out,
  output logic [1:0]       coeff_out
);

  logic [CNT_W-1:0] cnt, dur;
  logic             pending;

  function automatic logic [CNT_W-1:0] len(input logic [CNT_W-1:0] t);
    return (t == '0) ? CNT_W'(1) : t;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      signal_out <= 1'b0;
      pending    <= 1'b0;
      cnt        <= '0;
      dur        <= CNT_W'(1);
      freq_out   <= '0;
      power_out  <= '0;
      coeff_out  <= '0;
    end else if (pending) begin
      if (grant) begin
        pending    <= 1'b0;
        signal_out <= 1'b1;
        cnt        <= '0;
        dur        <= len(time_in);
        freq_out   <= freq_in;
        power_out  <= power_in;
        coeff_out  <= coeff_in;
      end
    end else if (tick) begin
      if (cnt + 1'b1 >= dur) begin
        cnt <= '0;
        if (signal_out) begin
          signal_out <= 1'b0;
          dur        <= len(time_in);
        end else begin
          pending    <= 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign req = pending;

endmodule
