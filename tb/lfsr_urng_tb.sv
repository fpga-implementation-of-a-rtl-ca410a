// lfsr_urng_tb: self-checking test of the leap-forward LFSR generator.
//
// A bit-serial reference LFSR (x^47 + x^5 + 1, one bit per step) is stepped
// eight times per clock and its state compared with the DUT output every
// cycle, with enable toggled at random.  Also checked: reset loads the
// seed, a disabled cycle holds the output, and the 16 high-nibble hist of
// 4096 outputs are each within 35% of the uniform expectation.
module lfsr_urng_tb;
  localparam logic [46:0] SEED = 47'h5A5A_1234_0F0F;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] rnd;
  int checks = 0, failures = 0;
  int hist [16];

  lfsr_urng #(.OUT_BITS(8), .SEED(SEED)) dut (.clk, .rst, .en, .rnd);

  always #5 clk = ~clk;

  logic [46:0] ref_s;
  task automatic ref_step();
    for (int k = 0; k < 8; k++) begin
      logic fb;
      fb = ref_s[46] ^ ref_s[4];
      ref_s = {ref_s[45:0], fb};
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = SEED;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++; if (rnd !== SEED[7:0]) begin failures++; $display("seed not loaded %h", rnd); end
    for (int n = 0; n < 6000; n++) begin
      logic e;
      e = ($urandom % 4) != 0;
      en = e;
      @(posedge clk);
      #1;
      if (e) ref_step();
      checks++;
      if (rnd !== ref_s[7:0]) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d got %h exp %h", n, rnd, ref_s[7:0]);
      end
    end
    en = 1;
    for (int n = 0; n < 4096; n++) begin
      @(posedge clk); #1;
      hist[rnd[7:4]]++;
    end
    for (int b = 0; b < 16; b++) begin
      checks++;
      if (hist[b] < 166 || hist[b] > 346) begin failures++; $display("bin %0d = %0d", b, hist[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
