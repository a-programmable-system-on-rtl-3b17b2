// tb_pll_system: closed-loop test of the three-phase PLL at its default gains.
// A balanced positive-sequence three-phase voltage of amplitude AMP and phase step
// STEP per clock (256 steps per cycle) is generated here in floating point and
// quantised to 8 bits. After reset the loop must lock within LOCK_LIMIT clocks: lock
// is declared when the angle error |phi - theta|, wrapped to +-128 steps, has stayed
// within TOL steps for 256 clocks in a row. Once locked, over several more cycles the
// angle error, the frequency (theta advance over 256 clocks) and the sina output
// against 127*sin(phi) are checked. The run covers several steps and amplitudes,
// resetting between them, and a phase jump of the input that the loop must relock to.
module tb_pll_system;
  import apf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  TOL = 6;            // phase steps (8.4 degrees)
  localparam int  LOCK_LIMIT = 3000;  // clocks

  logic clk = 1'b0, rst = 1'b1;
  sample_t va, vb, vc, cosa, cosb, cosc, sina, sinb, sinc;
  phase_t theta;
  vd_t vd;
  int checks = 0, failures = 0;
  real phi;          // input angle in steps
  int  step_now;
  real amp_now;

  pll_system dut (.clk, .rst, .va_in(va), .vb_in(vb), .vc_in(vc),
                  .cosa, .cosb, .cosc, .sina, .sinb, .sinc, .theta, .vd);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t q8(real x);
    return sample_t'($rtoi($floor(x + 0.5)));
  endfunction

  function automatic int wrap(int d);
    d = d % 256;
    if (d < 0) d += 256;
    return (d >= 128) ? d - 256 : d;
  endfunction

  // advance the input one clock
  // theta_q: the angle the sine/cosine outputs currently show (they lag theta by one
  // clock)
  phase_t theta_q;
  always @(posedge clk) begin
    phi     <= phi + real'(step_now);
    theta_q <= theta;
  end
  always_comb begin
    real w;
    w  = 2.0 * PI * phi / 256.0;
    va = q8(amp_now * $sin(w));
    vb = q8(amp_now * $sin(w - 2.0 * PI / 3.0));
    vc = q8(amp_now * $sin(w + 2.0 * PI / 3.0));
  end

  function automatic int ang_err();
    return wrap($rtoi(phi) - int'(theta_q));
  endfunction

  task automatic wait_lock(output int t_lock);
    int run;
    run = 0;
    t_lock = -1;
    for (int t = 0; t < LOCK_LIMIT + 256; t++) begin
      @(posedge clk);
      #1;
      run = (ang_err() <= TOL && ang_err() >= -TOL) ? run + 1 : 0;
      if (run == 256) begin
        t_lock = t - 255;
        break;
      end
    end
  endtask

  task automatic run_case(int stp, real amp, real phi0);
    int t_lock, th0, adv, e;
    step_now = stp;
    amp_now  = amp;
    rst = 1'b1;
    phi = phi0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait_lock(t_lock);
    checks++;
    if (t_lock < 0 || t_lock > LOCK_LIMIT) begin
      failures++;
      $display("no lock: step=%0d amp=%f", stp, amp);
      return;
    end
    $display("step=%0d amp=%0.0f locked after %0d clocks", stp, amp, t_lock);
    for (int cyc = 0; cyc < 8; cyc++) begin
      th0 = int'(theta);
      adv = 0;
      for (int t = 0; t < 256; t++) begin
        @(posedge clk);
        #1;
        e = ang_err();
        checks++;
        if (e > TOL || e < -TOL) begin
          failures++;
          if (failures < 10) $display("angle error %0d at step=%0d", e, stp);
        end
      end
      // theta advanced by stp*256 steps modulo 256 => compare wrapped advance
      adv = wrap(int'(theta) - th0);
      checks++;
      if (adv > 2 * TOL || adv < -2 * TOL) begin
        failures++;
        $display("frequency error: advance residue %0d", adv);
      end
      // sina against the ideal sine of the input angle (one extra clock of lag allowed
      // for by the tolerance)
      checks++;
      if (int'(sina) - $rtoi(127.0 * $sin(2.0 * PI * phi / 256.0)) > 30 ||
          $rtoi(127.0 * $sin(2.0 * PI * phi / 256.0)) - int'(sina) > 30) begin
        failures++;
        $display("sina=%0d far from ideal", sina);
      end
    end
  endtask

  initial begin
    int t_lock;
    step_now = 0;
    amp_now = 0.0;
    phi = 0.0;
    repeat (2) @(posedge clk);
    run_case(2, 100.0, 37.0);
    run_case(1, 120.0, 0.0);
    run_case(3, 90.0, 200.0);
    run_case(5, 110.0, 64.0);
    run_case(12, 127.0, 128.0);
    // phase jump of 90 degrees with the loop running: it must relock
    phi = phi + 64.0;
    wait_lock(t_lock);
    checks++;
    if (t_lock < 0) begin
      failures++;
      $display("no relock after phase jump");
    end else $display("relocked after phase jump in %0d clocks", t_lock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
