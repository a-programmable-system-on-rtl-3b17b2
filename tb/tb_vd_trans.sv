// tb_vd_trans: self-checking test of the PLL phase detector. Random voltages and
// cosines (including full-scale corners that saturate) are applied every clock; the
// expected vd, computed here from the products with 16-bit saturation, is compared one
// clock later. A watchdog ends the run if it hangs.
module tb_vd_trans;
  import apf_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  sample_t va, vb, vc, ca, cb, cc;
  vd_t vd;
  int checks = 0, failures = 0;
  int expected;

  vd_trans dut (.clk, .rst, .va_in(va), .vb_in(vb), .vc_in(vc),
                .va_cos_in(ca), .vb_cos_in(cb), .vc_cos_in(cc), .vd);

  always #5 clk = ~clk;

  function automatic int sat16(int x);
    return x > 32767 ? 32767 : (x < -32768 ? -32768 : x);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {va, vb, vc, ca, cb, cc} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      if (n < 4) begin
        // corners: all products at the positive or negative extreme
        va = (n[0]) ? -8'sd128 : 8'sd127;  vb = va;  vc = va;
        ca = (n[1]) ? -8'sd128 : 8'sd127;  cb = ca;  cc = ca;
      end else begin
        va = sample_t'($urandom); vb = sample_t'($urandom); vc = sample_t'($urandom);
        ca = sample_t'($urandom); cb = sample_t'($urandom); cc = sample_t'($urandom);
      end
      expected = sat16(int'(va) * int'(ca) + int'(vb) * int'(cb) + int'(vc) * int'(cc));
      @(posedge clk);
      #1;
      checks++;
      if (int'(vd) != expected) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d vd=%0d expected=%0d", n, vd, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
