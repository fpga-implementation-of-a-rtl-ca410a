// filter_bank_tb: self-checking test of the random-bandwidth filter bank.
//
// The testbench plays the symbol source: on every data_ready it loads a new
// random symbol pair (one cycle later, as the LDAPM does).  An independent
// model zero-stuffs those symbols by the selected factor and convolves them
// with raised-cosine taps computed here in floating point; every output
// sample must agree within 4 LSB.  For each of the four selects the
// spacing of data_ready pulses must equal 12, 10, 8 or 6 cycles.  Between
// selects the symbols are held at zero long enough to empty every filter,
// as happens between bursts.
module filter_bank_tb;
  import rasg_pkg::*;
  localparam int SPAN = 8;
  localparam real BETA = 0.25;
  localparam int NCYC = 4 * 1600;
  int LS [4] = '{12, 10, 8, 6};

  logic clk = 0, rst = 1;
  logic [1:0] fsel = 0;
  samp_t sym_i = 0, sym_q = 0, filt_i, filt_q;
  logic data_ready;
  int checks = 0, failures = 0;
  int ui [NCYC + 8], uq [NCYC + 8];
  int t = 0;

  filter_bank dut (.clk, .rst, .fsel, .sym_i, .sym_q, .data_ready, .filt_i, .filt_q);
  always #5 clk = ~clk;

  function automatic real h(int m, int l);
    real x, s, d;
    x = (real'(m) - real'(SPAN * l / 2)) / real'(l);
    if (x == 0.0) return 1.0;
    s = $sin(PI * x) / (PI * x);
    d = 1.0 - 4.0 * BETA * BETA * x * x;
    if (d < 1e-9 && d > -1e-9) return PI / 4.0 * $sin(PI / (2.0 * BETA)) / (PI / (2.0 * BETA));
    return s * $cos(PI * BETA * x) / d;
  endfunction

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_dr, ndr;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int sel = 0; sel < 4; sel++) begin
      int l;
      l = LS[sel];
      fsel = 2'(sel);
      for (int i = 0; i < NCYC + 8; i++) begin ui[i] = 0; uq[i] = 0; end
      last_dr = -1; ndr = 0;
      for (t = 0; t < NCYC; t++) begin
        logic dr;
        logic quiet;
        quiet = (t < 200) || (t >= NCYC - 200);
        dr = data_ready;
        if (dr) begin
          if (last_dr >= 0) begin
            checks++;
            if (t - last_dr != l) begin failures++; $display("sel %0d data_ready spacing %0d", sel, t - last_dr); end
          end
          last_dr = t; ndr++;
        end
        @(posedge clk);
        if (dr) begin
          sym_i = quiet ? 16'sd0 : samp_t'($urandom_range(8192) - 4096);
          sym_q = quiet ? 16'sd0 : samp_t'($urandom_range(8192) - 4096);
          if (t + 3 < NCYC + 8) begin ui[t + 3] = int'(sym_i); uq[t + 3] = int'(sym_q); end
        end
        #1;
        if (t >= 400) begin
          real yi, yq;
          int ei, eq;
          yi = 0.0; yq = 0.0;
          for (int m = 0; m < SPAN * l; m++) begin
            if (t + 1 - m >= 0) begin
              yi += h(m, l) * real'(ui[t + 1 - m]);
              yq += h(m, l) * real'(uq[t + 1 - m]);
            end
          end
          ei = int'(yi); eq = int'(yq);
          checks++;
          if (int'(filt_i) - ei > 4 || ei - int'(filt_i) > 4 || int'(filt_q) - eq > 4 || eq - int'(filt_q) > 4) begin
            failures++;
            if (failures < 8) $display("sel %0d t=%0d got %0d,%0d exp %0d,%0d", sel, t, filt_i, filt_q, ei, eq);
          end
        end
      end
      checks++;
      if (ndr < NCYC / l - 2) begin failures++; $display("sel %0d only %0d requests", sel, ndr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
