// rns_prng_tb: self-checking test of the RNS pseudo-random generator.
//
// An independent cycle model keeps the eight ring indices and computes each
// table value at run time from the CRT formula (the inverse found by
// search, not by exponentiation).  Enable, skip and reset are driven at
// random; every cycle prng_out, data_valid and count are compared with the
// model.  Also checks that all four commands occurred and that 4096 outputs
// fill 16 bins within 25% of uniform.
module rns_prng_tb;
  import rasg_pkg::*;
  logic clk = 0, enable = 0, reset = 1, skip = 0;
  logic [7:0] prng_out;
  logic data_valid;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int hist [16];
  int ncmd [4];

  rns_prng dut (.clk, .enable, .reset, .skip, .prng_out, .data_valid, .count);
  always #5 clk = ~clk;

  longint unsigned P [8] = '{857, 859, 877, 887, 907, 911, 919, 929};
  longint unsigned S [8] = '{330, 69, 759, 386, 156, 3, 599, 343};
  longint unsigned cm256 [8], cinv [8];

  function automatic longint unsigned tval(int i, longint unsigned x);
    return (cm256[i] * ((cinv[i] * x) % P[i])) % 256;
  endfunction

  longint unsigned idx [8];
  int cmd_m, lut_sum, adv1, adv2, cnt_m;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      longint unsigned mp, m256;
      mp = 1; m256 = 1;
      for (int j = 0; j < 8; j++) if (j != i) begin
        mp = (mp * P[j]) % P[i];
        m256 = (m256 * P[j]) % 256;
      end
      cm256[i] = m256;
      for (longint unsigned c = 1; c < P[i]; c++) if ((c * mp) % P[i] == 1) cinv[i] = c;
    end
    cmd_m = 3; cnt_m = 0; adv1 = 0; adv2 = 0;
    for (int i = 0; i < 8; i++) idx[i] = S[i];
    repeat (4) @(posedge clk);
    #1;
    for (int n = 0; n < 20000; n++) begin
      int r, new_cmd, new_sum;
      r = $urandom % 100;
      reset  = (r < 2);
      skip   = (r >= 2 && r < 12);
      enable = (r >= 12 && r < 70);
      new_cmd = reset ? 3 : skip ? 2 : enable ? 1 : 0;
      @(posedge clk);
      // model of the register stages at this edge
      new_sum = 0;
      for (int i = 0; i < 8; i++) new_sum += int'(tval(i, idx[i]));
      adv2 = adv1;
      adv1 = (cmd_m != 0);
      if (cmd_m == 3) cnt_m = 0; else if (cmd_m == 1 || cmd_m == 2) cnt_m++;
      for (int i = 0; i < 8; i++) begin
        case (cmd_m)
          1: idx[i] = (idx[i] + 1) % P[i];
          2: idx[i] = (idx[i] + 2) % P[i];
          3: idx[i] = S[i];
          default: ;
        endcase
      end
      ncmd[cmd_m]++;
      cmd_m = new_cmd;
      lut_sum = new_sum % 256;
      #1;
      if (n > 4) begin
        checks++;
        if (prng_out !== 8'(lut_sum)) begin
          failures++;
          if (failures < 60) $display("n=%0d prng_out %0d exp %0d", n, prng_out, lut_sum);
        end
        checks++;
        if (data_valid !== 1'(adv2)) begin failures++; if (failures < 6) $display("n=%0d data_valid", n); end
        checks++;
        if (count !== 32'(cnt_m)) begin failures++; if (failures < 6) $display("n=%0d count %0d exp %0d", n, count, cnt_m); end
      end
    end
    reset = 0; skip = 0; enable = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 4096; n++) begin @(posedge clk); #1; hist[prng_out[7:4]]++; end
    for (int b = 0; b < 16; b++) begin
      checks++;
      if (hist[b] < 192 || hist[b] > 320) begin failures++; $display("bin %0d = %0d", b, hist[b]); end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (ncmd[c] == 0) begin failures++; $display("command %0d never issued", c); end
    end
    $display("commands hold=%0d step1=%0d step2=%0d jam=%0d", ncmd[0], ncmd[1], ncmd[2], ncmd[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
