// cochannel_guard_tb: self-checking test of the co-channel guard.
//
// Random requests, candidate steps, on flags and current steps for three
// branches are applied; half of the candidates are placed within +-40
// steps of another branch's step so the 32-step boundary is exercised.
// The expected grant is worked out from frequencies in kHz (3.90625 kHz
// per step, spacing must exceed 125 kHz) rather than from step counts.
// Counts grants, refusals because of an active branch and refusals because
// of a simultaneous lower-numbered request; each must occur.
module cochannel_guard_tb;
  localparam int NB = 3;
  logic [NB-1:0] req, on, grant;
  logic [7:0] cand [NB], cur [NB];
  int checks = 0, failures = 0;
  int n_grant = 0, n_ref_on = 0, n_ref_req = 0, n_edge = 0;

  cochannel_guard #(.NB(NB), .MIN_STEP_SEP(32)) dut (.req, .cand_step(cand), .on, .cur_step(cur), .grant);

  function automatic real khz(logic [7:0] s);
    return (s < 128) ? real'(s) * 3.90625 : (real'(s) - 256.0) * 3.90625;
  endfunction

  function automatic logic close(logic [7:0] a, logic [7:0] b);
    real d;
    d = khz(a) - khz(b);
    if (d < 0.0) d = -d;
    return d <= 125.0;
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] legal(logic [7:0] s);
    return (s > 64 && s < 192) ? s - 8'd128 : s;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [NB-1:0] exp_g;
      for (int b = 0; b < NB; b++) begin
        req[b] = ($urandom % 2);
        on[b]  = ($urandom % 2);
        cur[b] = legal(8'($urandom));
      end
      for (int b = 0; b < NB; b++) begin
        if ($urandom % 2) cand[b] = legal(8'(int'(cur[(b + 1) % NB]) + int'($urandom % 81) - 40));
        else              cand[b] = legal(8'($urandom));
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        logic ok_on, ok_req;
        ok_on = 1; ok_req = 1;
        for (int j = 0; j < NB; j++) if (j != b) begin
          if (on[j] && close(cand[b], cur[j])) ok_on = 0;
          if (j < b && req[j] && close(cand[b], cand[j])) ok_req = 0;
          if (on[j] && (close(cand[b], cur[j]) != close(cand[b] + 8'd1, cur[j]))) n_edge++;
        end
        exp_g[b] = req[b] && ok_on && ok_req;
        if (req[b]) begin
          if (exp_g[b]) n_grant++;
          else if (!ok_on) n_ref_on++;
          else n_ref_req++;
        end
      end
      checks++;
      if (grant !== exp_g) begin
        failures++;
        if (failures < 8) $display("n=%0d req %b on %b cand %0d %0d %0d cur %0d %0d %0d grant %b exp %b",
                                   n, req, on, cand[0], cand[1], cand[2], cur[0], cur[1], cur[2], grant, exp_g);
      end
    end
    $display("grants=%0d refused_by_active=%0d refused_by_request=%0d boundary_cases=%0d", n_grant, n_ref_on, n_ref_req, n_edge);
    checks++; if (n_grant == 0 || n_ref_on == 0 || n_ref_req == 0 || n_edge == 0) begin failures++; $display("a case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
