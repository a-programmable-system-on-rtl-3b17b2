// tb_magnitude_determination: self-checking test of the band comparison. Random error
// vectors and random bands are applied; the expected flags come from the Euclidean
// length sqrt(alpha^2 + beta^2) computed in floating point: inner when it is below mi,
// outer when it is above mo. Lengths within 0.01 of a band are skipped.
module tb_magnitude_determination;
  import apf_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [9:0] alpha, beta;
  logic [7:0] mi, mo;
  logic inner, outer;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_mid = 0;

  magnitude_determination dut (.clk, .rst, .alpha, .beta, .mi, .mo, .inner, .outer);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real len;
    bit e_in, e_out;
    alpha = '0; beta = '0; mi = '0; mo = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      mi = 8'($urandom_range(1, 120));
      mo = 8'(int'(mi) + $urandom_range(0, 135));
      alpha = 10'($signed($urandom_range(0, 2 * int'(mo) + 40)) - int'(mo) - 20);
      beta  = 10'($signed($urandom_range(0, 2 * int'(mo) + 40)) - int'(mo) - 20);
      if (n == 0) begin alpha = -10'sd511; beta = -10'sd511; mo = 8'd255; end   // largest length
      len = $sqrt(real'(alpha) * real'(alpha) + real'(beta) * real'(beta));
      e_in  = len < real'(mi);
      e_out = len > real'(mo);
      @(posedge clk);
      #1;
      if ((len - real'(mi) < 0.01 && real'(mi) - len < 0.01) ||
          (len - real'(mo) < 0.01 && real'(mo) - len < 0.01)) continue;
      checks++;
      if (inner != e_in || outer != e_out) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d mi=%0d mo=%0d: inner=%0d outer=%0d", alpha, beta, mi, mo, inner, outer);
      end
      if (e_in) n_in++; else if (e_out) n_out++; else n_mid++;
    end
    checks++;
    if (n_in == 0 || n_out == 0 || n_mid == 0) begin
      failures++;
      $display("region not covered: in=%0d mid=%0d out=%0d", n_in, n_mid, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
