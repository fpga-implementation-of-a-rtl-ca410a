// burst_ctrl_tb: self-checking test of the burst controller.
//
// Ticks arrive every 3 cycles; freq/time/power/coeff inputs change at
// random every cycle and the guard grants a pending request at random.
// A period-level model checks: a burst starts the cycle after grant with
// the parameters present at the grant; an on period lasts exactly the
// drawn number of ticks (0 counting as 1); an off period lasts the number
// drawn at the falling toggle; req rises exactly when the off period ends;
// the outputs are stable within a burst.  Counts refused requests, zero-
// length draws and long (>= 200 tick) periods, each of which must occur.
module burst_ctrl_tb;
  logic clk = 0, rst = 1, tick = 0, grant = 0;
  logic [7:0] freq_in, time_in, power_in;
  logic [1:0] coeff_in;
  logic req, on;
  logic [7:0] freq_out, power_out;
  logic [1:0] coeff_out;
  int checks = 0, failures = 0;
  int n_refused = 0, n_zero = 0, n_long = 0, n_bursts = 0;

  burst_ctrl dut (.clk, .rst, .tick, .freq_in, .time_in, .power_in, .coeff_in, .grant,
                  .req, .signal_out(on), .freq_out, .power_out, .coeff_out);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int len(logic [7:0] t);
    return (t == 0) ? 1 : int'(t);
  endfunction

  // model state
  int  m_state;        // 0 = off counting, 1 = pending, 2 = on
  int  m_left;         // ticks left in the period
  logic [7:0] m_f, m_p;
  logic [1:0] m_c;

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    m_state = 0; m_left = 1;
    cyc = 0;
    while (n_bursts < 60) begin
      logic t_now, g_now;
      logic [7:0] ti, fi, pi;
      logic [1:0] ci;
      int r;
      r = $urandom % 16;
      ti = (r == 0) ? 8'd0 : (r == 1) ? 8'd255 : (r < 6) ? 8'($urandom % 256) : 8'(1 + $urandom % 12);
      fi = 8'($urandom); pi = 8'($urandom); ci = 2'($urandom);
      t_now = (cyc % 3 == 0);
      g_now = ($urandom % 4 == 0);
      time_in = ti; freq_in = fi; power_in = pi; coeff_in = ci; tick = t_now; grant = g_now;
      // check outputs against the model before the edge
      checks++;
      if (req !== (m_state == 1) || on !== (m_state == 2)) begin
        failures++;
        if (failures < 8) $display("cyc %0d state %0d req %b on %b", cyc, m_state, req, on);
      end
      if (m_state == 2) begin
        checks++;
        if (freq_out !== m_f || power_out !== m_p || coeff_out !== m_c) begin failures++; $display("params wrong"); end
      end
      // advance the model by this edge
      if (m_state == 1) begin
        if (g_now) begin
          m_state = 2; m_left = len(ti); m_f = fi; m_p = pi; m_c = ci; n_bursts++;
          if (ti == 0) n_zero++;
          if (len(ti) >= 200) n_long++;
        end else n_refused++;
      end else if (t_now) begin
        m_left--;
        if (m_left == 0) begin
          if (m_state == 2) begin
            m_state = 0; m_left = len(ti);
            if (ti == 0) n_zero++;
            if (len(ti) >= 200) n_long++;
          end else m_state = 1;
        end
      end
      @(posedge clk); #1;
      cyc++;
    end
    $display("bursts=%0d refused=%0d zero=%0d long=%0d", n_bursts, n_refused, n_zero, n_long);
    checks++; if (n_refused == 0) begin failures++; $display("no refusal seen"); end
    checks++; if (n_zero == 0) begin failures++; $display("no zero-length draw seen"); end
    checks++; if (n_long == 0) begin failures++; $display("no long period seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
