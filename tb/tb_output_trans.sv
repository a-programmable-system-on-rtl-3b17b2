// tb_output_trans: self-checking test of the PLL oscillator (phase accumulator, sine
// table, post processor). Random phase steps are applied; the accumulated angle is
// checked exactly, and each of the six outputs is compared with 127*sin of its ideal
// angle (theta, theta-/+120 degrees, and the same plus 90 degrees for the cosines),
// computed here in floating point. The table is a half-step-sampled quarter wave and
// 120 degrees is rounded to 85 steps, so up to 3 LSB of difference is allowed.
module tb_output_trans;
  import apf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst = 1'b1;
  phase_t din, theta;
  sample_t cosa, cosb, cosc, sina, sinb, sinc;
  int checks = 0, failures = 0;
  int th_m, th_prev;

  output_trans dut (.clk, .rst, .din, .theta, .cosa, .cosb, .cosc, .sina, .sinb, .sinc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string name, sample_t got, real deg);
    int ideal;
    ideal = $rtoi($floor(127.0 * $sin(deg * PI / 180.0) + 0.5));
    checks++;
    if ((int'(got) - ideal) > 3 || (ideal - int'(got)) > 3) begin
      failures++;
      if (failures < 10) $display("%s=%0d ideal=%0d at %f deg", name, got, ideal, deg);
    end
  endtask

  initial begin
    real d;
    din = '0;
    th_m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      din = (n < 600) ? phase_t'(1) : phase_t'($urandom);
      th_prev = th_m;                // outputs follow theta one clock late
      th_m = (th_m + int'(din)) % 256;
      @(posedge clk);
      #1;
      checks++;
      if (int'(theta) != th_m) begin
        failures++;
        if (failures < 10) $display("theta=%0d expected %0d", theta, th_m);
      end
      d = real'(th_prev) * 360.0 / 256.0;
      chk("sina", sina, d);
      chk("sinb", sinb, d - 120.0);
      chk("sinc", sinc, d + 120.0);
      chk("cosa", cosa, d + 90.0);
      chk("cosb", cosb, d + 90.0 - 120.0);
      chk("cosc", cosc, d + 90.0 + 120.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
