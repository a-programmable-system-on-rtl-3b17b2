// tb_pi_controller: self-checking test of the PLL loop filter at its default gains.
// A random error sequence (bursts of constant values and random words) is applied;
// a reference model here keeps a 64-bit integrator and forms
// (KP*e >> NP) + (acc >> NI) with 16-bit saturation, compared one clock later.
// A long constant error drives the output into saturation.
module tb_pi_controller;
  import apf_pkg::*;

  localparam int KP = 1, KI = 1, NP = 11, NI = 16;

  logic clk = 1'b0, rst = 1'b1;
  vd_t din, dout;
  int checks = 0, failures = 0;
  longint acc_m, expected, p, i;

  pi_controller dut (.clk, .rst, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(vd_t e);
    din = e;
    // floor division by a power of two, as an arithmetic right shift does
    p = longint'(KP) * longint'(e);
    p = (p >= 0) ? p / (longint'(1) << NP) : -((-p + (longint'(1) << NP) - 1) / (longint'(1) << NP));
    i = (acc_m >= 0) ? acc_m / (longint'(1) << NI)
                     : -((-acc_m + (longint'(1) << NI) - 1) / (longint'(1) << NI));
    expected = p + i;
    if (expected > 32767) expected = 32767;
    if (expected < -32768) expected = -32768;
    acc_m = acc_m + longint'(KI) * longint'(e);
    @(posedge clk);
    #1;
    checks++;
    if (longint'(dout) != expected) begin
      failures++;
      if (failures < 10) $display("mismatch e=%0d dout=%0d expected=%0d", e, dout, expected);
    end
  endtask

  initial begin
    din = '0;
    acc_m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) step(vd_t'($urandom));
    for (int n = 0; n < 500; n++)  step(vd_t'(1000));
    for (int n = 0; n < 500; n++)  step(vd_t'(-3000));
    for (int n = 0; n < 2000; n++) step(vd_t'(32767));   // pushes dout into saturation
    for (int n = 0; n < 500; n++)  step(vd_t'(-32768));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
