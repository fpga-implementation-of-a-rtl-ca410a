// aggregate_top_full_tb: the aggregate spectrum generator at full size.
//
// Instantiates aggregate_top with every parameter at its default: three
// branches, a 1000-cycle burst clock (1 ms at a 1 MHz sample clock) and
// the 32-step co-channel guard.  Runs 30 million samples (30 s of
// signal), long enough for each branch to complete about a hundred bursts of
// 1 .. 255 ms.  The checks are those of the reduced test
// (aggregate_check.svh), and every mechanism must occur here as well.
module aggregate_top_full_tb;
  localparam int  TICKS       = 1000;
  localparam int  NCYC        = 30000000;
  localparam bit  REQUIRE_ALL = 1'b1;

`include "aggregate_check.svh"

  aggregate_top dut (
    .clk, .rst, .real_out, .imag_out, .br_on, .br_step, .br_power, .br_fsel
  );
endmodule
