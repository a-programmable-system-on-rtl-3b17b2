// tb_direct_current_controller: test of the space-vector hysteresis current
// controller in two parts.
//
// 1. Directed: an error vector of angle (k-1)*60 degrees and length far beyond the
//    outer band must, three clocks later, set the mode and apply active vector Vk.
//    Shrinking it to between the bands must hold that vector (hysteresis); shrinking
//    it inside the inner band must give the zero vector; growing it back to between
//    the bands must keep the zero vector.
// 2. Closed loop: the controller drives a behavioural inverter and inductor model
//    against a line EMF while following a 256-clock sinusoidal current reference. After
//    settling, every phase error must stay within ERR_MAX, and every mechanism (all six
//    active vectors, both zero vectors, holding in each mode) must have happened.
module tb_direct_current_controller;
  import apf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  ERR_MAX = 28;

  logic clk = 1'b0, rst = 1'b1;
  sample_t ea8, eb8, ec8;
  logic [7:0] mi, mo;
  logic pwma, pwmb, pwmc, active;
  sector_e sector;
  int checks = 0, failures = 0;
  logic [2:0] vec [1:6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  // plant
  logic closed = 1'b0;
  real ia, ib, ic, emf_a, emf_b, emf_c;
  real ref_a, ref_b, ref_c;

  direct_current_controller dut (.clk, .rst, .delia(ea8), .delib(eb8), .delic(ec8),
                                 .mi, .mo, .pwma, .pwmb, .pwmc, .sector, .active);

  inverter_rl_model #(.VDC_G(6.0)) plant (.clk, .rst(rst | ~closed), .sa(pwma), .sb(pwmb), .sc(pwmc),
                                          .ea(emf_a), .eb(emf_b), .ec(emf_c),
                                          .ia, .ib, .ic);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t q8(real x);
    int v;
    v = $rtoi($floor(x + 0.5));
    return sample_t'(v > 127 ? 127 : (v < -128 ? -128 : v));
  endfunction

  task automatic set_vec(real mag, real deg);
    ea8 = q8(mag * $cos(deg * PI / 180.0));
    eb8 = q8(mag * $cos((deg - 120.0) * PI / 180.0));
    ec8 = q8(mag * $cos((deg + 120.0) * PI / 180.0));
  endtask

  task automatic expect_legs(string what, logic [2:0] v, logic act);
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if ({pwma, pwmb, pwmc} != v || active != act) begin
      failures++;
      $display("%s: legs=%b active=%0d, expected %b/%0d", what, {pwma, pwmb, pwmc}, active, v, act);
    end
  endtask

  int n_sector [7];
  int n_zero000 = 0, n_zero111 = 0, n_hold_active = 0, n_hold_zero = 0, n_enter = 0;
  int max_err = 0;
  logic active_q;

  initial begin
    int t, e;
    real w;
    {ea8, eb8, ec8} = '0;
    mi = 8'd8;
    mo = 8'd20;
    emf_a = 0.0; emf_b = 0.0; emf_c = 0.0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // ---- 1. directed
    for (int k = 1; k <= 6; k++) begin
      real deg;
      deg = 60.0 * real'(k - 1);
      set_vec(60.0, deg);       // |alpha| = 90  > mo
      expect_legs("far", vec[k], 1'b1);
      set_vec(10.0, deg);       // |alpha| = 15, between the bands
      expect_legs("between, active", vec[k], 1'b1);
      set_vec(2.0, deg);        // |alpha| = 3 < mi
      expect_legs("inside", ($countones(vec[k]) >= 2) ? 3'b111 : 3'b000, 1'b0);
      set_vec(10.0, deg + 30.0);
      expect_legs("between, zero", ($countones(vec[k]) >= 2) ? 3'b111 : 3'b000, 1'b0);
    end

    // ---- 2. closed loop
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    closed = 1'b1;
    active_q = 1'b0;
    for (t = 0; t < 4096; t++) begin
      w = 2.0 * PI * real'(t) / 256.0;
      ref_a = 60.0 * $sin(w);
      ref_b = 60.0 * $sin(w - 2.0 * PI / 3.0);
      ref_c = 60.0 * $sin(w + 2.0 * PI / 3.0);
      emf_a = 1.5 * $sin(w + 0.3);
      emf_b = 1.5 * $sin(w + 0.3 - 2.0 * PI / 3.0);
      emf_c = 1.5 * $sin(w + 0.3 + 2.0 * PI / 3.0);
      ea8 = q8(ref_a - ia);
      eb8 = q8(ref_b - ib);
      ec8 = q8(ref_c - ic);
      @(posedge clk);
      #1;
      if (t >= 512) begin
        e = int'(ea8); if (e < 0) e = -e; if (e > max_err) max_err = e;
        e = int'(eb8); if (e < 0) e = -e; if (e > max_err) max_err = e;
        e = int'(ec8); if (e < 0) e = -e; if (e > max_err) max_err = e;
        checks++;
        if (int'(ea8) > ERR_MAX || int'(ea8) < -ERR_MAX ||
            int'(eb8) > ERR_MAX || int'(eb8) < -ERR_MAX ||
            int'(ec8) > ERR_MAX || int'(ec8) < -ERR_MAX) begin
          failures++;
          if (failures < 10) $display("t=%0d error too large: %0d %0d %0d", t, ea8, eb8, ec8);
        end
      end
      if (active) n_sector[int'(sector)]++;
      if (!active && {pwma, pwmb, pwmc} == 3'b000) n_zero000++;
      if (!active && {pwma, pwmb, pwmc} == 3'b111) n_zero111++;
      if (active && active_q && !dut.outer) n_hold_active++;
      if (!active && !active_q && !dut.inner) n_hold_zero++;
      if (active && !active_q) n_enter++;
      active_q = active;
    end
    $display("closed loop: max |error| %0d, active entries %0d, zero 000/111 %0d/%0d, holds active/zero %0d/%0d",
             max_err, n_enter, n_zero000, n_zero111, n_hold_active, n_hold_zero);
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (n_sector[k] == 0) begin failures++; $display("active vector %0d never applied", k); end
    end
    checks++;
    if (n_zero000 == 0 || n_zero111 == 0 || n_hold_active == 0 || n_hold_zero == 0 || n_enter == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
