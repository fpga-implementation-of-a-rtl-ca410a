// aggregate_top_tb: end-to-end test of the aggregate spectrum generator.
//
// Runs the full three-branch design with the burst clock shortened to 10
// sample clocks per tick (bursts of 0 .. 2550 cycles instead of 0 .. 255 ms)
// so that every mechanism occurs many times in 400k cycles: bursts of every
// branch, all four filters, positive and negative frequencies, step
// restriction, guard refusals, overlapping bursts and noise saturation.
// The checks themselves are in aggregate_check.svh.
module aggregate_top_tb;
  localparam int  TICKS       = 10;
  localparam int  NCYC        = 400000;
  localparam bit  REQUIRE_ALL = 1'b1;

`include "aggregate_check.svh"

  aggregate_top #(.TICK_DIV(TICKS)) dut (
    .clk, .rst, .real_out, .imag_out, .br_on, .br_step, .br_power, .br_fsel
  );
endmodule
