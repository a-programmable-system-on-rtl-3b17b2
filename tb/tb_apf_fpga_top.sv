// tb_apf_fpga_top: end-to-end run of the FPGA design at its default parameters.
//
// A balanced three-phase line voltage (amplitude 100 LSB, 256 clocks per cycle) feeds
// the PLL. A reference-current calculation, which lives outside the FPGA design and is
// modelled here, turns the PLL's sines into three compensating-current references of
// amplitude IREF*127/127; the current controller makes a behavioural inverter and
// inductor model follow them against the line voltage as back EMF. Midway the line
// voltage jumps by 45 degrees in phase and the PLL has to relock.
//
// Checks: the PLL locks (angle error within 6 steps for 256 clocks) before the current
// loop is judged; afterwards every phase-current error stays within ERR_MAX LSB and the
// PLL's angle follows the line. Every mechanism of the design is counted and must
// occur at least once: PLL lock, PLL relock after the jump, each of the six active
// vectors, both zero vectors, the hysteresis holding in active and in zero mode, and
// PI integrator pull-in (the PLL frequency word reaching the line's step).
module tb_apf_fpga_top;
  import apf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  STEP = 1;           // line frequency: 256 clocks per cycle
  localparam real AMP = 100.0;
  localparam real IREF = 60.0;
  localparam int  ERR_MAX = 28;
  localparam int  TOL = 6;

  logic clk = 1'b0, rst = 1'b1;
  sample_t va, vb, vc, cosa, cosb, cosc, sina, sinb, sinc;
  phase_t theta, theta_q;
  vd_t vd;
  sample_t delia, delib, delic;
  logic [7:0] mi = 8'd8, mo = 8'd20;
  logic pwma, pwmb, pwmc, active;
  sector_e sector;
  int checks = 0, failures = 0;
  real phi = 0.0;
  real ia, ib, ic, emf_a, emf_b, emf_c;
  logic plant_run = 1'b0;

  apf_fpga_top dut (
    .clk, .rst,
    .va_in(va), .vb_in(vb), .vc_in(vc),
    .cosa, .cosb, .cosc, .sina, .sinb, .sinc, .theta, .vd,
    .delia, .delib, .delic, .mi, .mo,
    .pwma, .pwmb, .pwmc, .sector, .active
  );

  inverter_rl_model #(.VDC_G(6.0)) plant (.clk, .rst(~plant_run), .sa(pwma), .sb(pwmb), .sc(pwmc),
                                          .ea(emf_a), .eb(emf_b), .ec(emf_c), .ia, .ib, .ic);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t q8(real x);
    int v;
    v = $rtoi($floor(x + 0.5));
    return sample_t'(v > 127 ? 127 : (v < -128 ? -128 : v));
  endfunction

  function automatic int wrap(int d);
    d = d % 256;
    if (d < 0) d += 256;
    return (d >= 128) ? d - 256 : d;
  endfunction

  // line voltage, its scaled copy as back EMF, and the current errors from the
  // references derived from the PLL's sines
  always_comb begin
    real w;
    w = 2.0 * PI * phi / 256.0;
    va = q8(AMP * $sin(w));
    vb = q8(AMP * $sin(w - 2.0 * PI / 3.0));
    vc = q8(AMP * $sin(w + 2.0 * PI / 3.0));
    emf_a = 0.015 * real'(va);
    emf_b = 0.015 * real'(vb);
    emf_c = 0.015 * real'(vc);
    delia = plant_run ? q8(IREF * real'(sina) / 127.0 - ia) : '0;
    delib = plant_run ? q8(IREF * real'(sinb) / 127.0 - ib) : '0;
    delic = plant_run ? q8(IREF * real'(sinc) / 127.0 - ic) : '0;
  end

  always @(posedge clk) begin
    phi     <= phi + real'(STEP);
    theta_q <= theta;
  end

  int n_sector [7];
  int n_zero000 = 0, n_zero111 = 0, n_hold_active = 0, n_hold_zero = 0, n_enter = 0;
  int n_lock = 0, n_relock = 0, n_pull_in = 0;
  int max_err = 0;
  logic active_q = 1'b0;

  function automatic int ang_err();
    return wrap($rtoi(phi) - int'(theta_q));
  endfunction

  task automatic wait_lock(input int limit, output int t_lock);
    int run;
    run = 0;
    t_lock = -1;
    for (int t = 0; t < limit; t++) begin
      @(posedge clk);
      #1;
      run = (ang_err() <= TOL && ang_err() >= -TOL) ? run + 1 : 0;
      if (run == 256) begin
        t_lock = t - 255;
        break;
      end
    end
  endtask

  task automatic run_current_loop(int cycles, int settle);
    int e;
    for (int t = 0; t < cycles; t++) begin
      @(posedge clk);
      #1;
      if (int'(dut.u_pll.dout) == STEP) n_pull_in++;
      if (t >= settle) begin
        foreach (e_list[i]) begin
          e = e_list[i];
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
        end
        checks++;
        if (!in_band(delia) || !in_band(delib) || !in_band(delic)) begin
          failures++;
          if (failures < 10) $display("t=%0d current error %0d %0d %0d", t, delia, delib, delic);
        end
        checks++;
        if (ang_err() > TOL || ang_err() < -TOL) begin
          failures++;
          if (failures < 10) $display("t=%0d PLL angle error %0d", t, ang_err());
        end
      end
      if (active) n_sector[int'(sector)]++;
      if (!active && {pwma, pwmb, pwmc} == 3'b000) n_zero000++;
      if (!active && {pwma, pwmb, pwmc} == 3'b111) n_zero111++;
      if (active && active_q && !dut.u_dcc.outer) n_hold_active++;
      if (!active && !active_q && !dut.u_dcc.inner) n_hold_zero++;
      if (active && !active_q) n_enter++;
      active_q = active;
    end
  endtask

  int e_list [3];
  always_comb e_list = '{int'(delia), int'(delib), int'(delic)};

  function automatic bit in_band(sample_t e);
    return int'(e) <= ERR_MAX && int'(e) >= -ERR_MAX;
  endfunction

  initial begin
    int t_lock;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // PLL alone first
    wait_lock(4000, t_lock);
    checks++;
    if (t_lock < 0) begin
      failures++;
      $display("PLL did not lock");
    end else begin
      n_lock++;
      $display("PLL locked after %0d clocks", t_lock);
    end

    // current loop on the PLL's references
    plant_run = 1'b1;
    run_current_loop(4096, 256);

    // line phase jump: +45 degrees
    phi = phi + 32.0;
    wait_lock(4000, t_lock);
    checks++;
    if (t_lock < 0) begin
      failures++;
      $display("PLL did not relock after the phase jump");
    end else begin
      n_relock++;
      $display("PLL relocked after %0d clocks", t_lock);
    end
    run_current_loop(2048, 256);

    $display("max |current error| %0d; active entries %0d; zero 000/111 %0d/%0d; holds active/zero %0d/%0d",
             max_err, n_enter, n_zero000, n_zero111, n_hold_active, n_hold_zero);
    $display("sectors 1..6: %0d %0d %0d %0d %0d %0d; lock %0d relock %0d pull-in %0d",
             n_sector[1], n_sector[2], n_sector[3], n_sector[4], n_sector[5], n_sector[6],
             n_lock, n_relock, n_pull_in);
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (n_sector[k] == 0) begin failures++; $display("active vector %0d never applied", k); end
    end
    checks++; if (n_zero000 == 0)     begin failures++; $display("zero vector 000 never applied"); end
    checks++; if (n_zero111 == 0)     begin failures++; $display("zero vector 111 never applied"); end
    checks++; if (n_hold_active == 0) begin failures++; $display("active-mode hold never happened"); end
    checks++; if (n_hold_zero == 0)   begin failures++; $display("zero-mode hold never happened"); end
    checks++; if (n_enter == 0)       begin failures++; $display("active mode never entered"); end
    checks++; if (n_lock == 0 || n_relock == 0) begin failures++; $display("lock or relock missing"); end
    checks++; if (n_pull_in == 0)     begin failures++; $display("PLL frequency word never reached the line step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
