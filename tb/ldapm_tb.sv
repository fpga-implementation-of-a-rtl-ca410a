// ldapm_tb: self-checking test of the LDAPM symbol source (QPSK).
//
// Two reference RNS PRNGs with the DUT's seeds are advanced by the same
// requests; each requested symbol must be +-2896 (1/sqrt(2) in 16_12) with
// the sign given by bit 0 of the matching reference byte, or 0 when the
// burst is off.  Symbols must hold between requests.  Requests come every
// 6 to 12 cycles.  Also checks all four QPSK points occur.
module ldapm_tb;
  import rasg_pkg::*;
  localparam u32_arr8_t SI = '{11, 22, 33, 44, 55, 66, 77, 88};
  localparam u32_arr8_t SQ = '{99, 111, 122, 133, 144, 155, 166, 177};
  logic clk = 0, rst = 1, on = 0, next = 0;
  samp_t sym_i, sym_q;
  logic [7:0] ri, rq;
  logic dvi, dvq;
  logic [31:0] ci, cq;
  int checks = 0, failures = 0;
  int pts [4];

  ldapm #(.BITS_PER_RAIL(1), .SEEDS_I(SI), .SEEDS_Q(SQ)) dut (.clk, .rst, .on, .next, .sym_i, .sym_q);
  rns_prng #(.SEEDS(SI)) ref_i (.clk, .enable(next), .reset(rst), .skip(1'b0), .prng_out(ri), .data_valid(dvi), .count(ci));
  rns_prng #(.SEEDS(SQ)) ref_q (.clk, .enable(next), .reset(rst), .skip(1'b0), .prng_out(rq), .data_valid(dvq), .count(cq));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);
    #1;
    for (int n = 0; n < 3000; n++) begin
      int gap;
      logic [7:0] ei, eq;
      samp_t xi, xq, hi, hq;
      gap = 5 + $urandom % 7;
      hi = sym_i; hq = sym_q;
      repeat (gap) begin
        @(posedge clk); #1;
        checks++;
        if (sym_i !== hi || sym_q !== hq) begin failures++; $display("symbol changed without request"); end
      end
      if (n % 200 == 0) on = ~on;
      ei = ri; eq = rq;
      next = 1;
      @(posedge clk); #1;
      next = 0;
      xi = !on ? 16'sd0 : ei[0] ? 16'sd2896 : -16'sd2896;
      xq = !on ? 16'sd0 : eq[0] ? 16'sd2896 : -16'sd2896;
      checks++;
      if (sym_i !== xi || sym_q !== xq) begin
        failures++;
        if (failures < 6) $display("n=%0d got %0d,%0d exp %0d,%0d", n, sym_i, sym_q, xi, xq);
      end
      if (on) pts[{ei[0], eq[0]}]++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (pts[k] < 200) begin failures++; $display("point %0d seen %0d times", k, pts[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
