// tb_three2twophase: self-checking test of the shift-and-add Clarke transform.
// Random and extreme three-phase errors are applied; alpha and beta are compared one
// clock later with alpha = a - (b+c)/2 and beta = (b-c)*sqrt(3)/2 computed here in
// floating point. Shift rounding and the sqrt(3)/2 approximation allow 2 LSB.
module tb_three2twophase;
  import apf_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  sample_t a, b, c;
  logic signed [9:0] alpha, beta;
  int checks = 0, failures = 0;

  three2twophase dut (.clk, .rst, .delia(a), .delib(b), .delic(c), .alpha, .beta);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string name, int got, real ideal);
    checks++;
    if (real'(got) - ideal > 2.0 || ideal - real'(got) > 2.0) begin
      failures++;
      if (failures < 10) $display("%s=%0d ideal=%f (a=%0d b=%0d c=%0d)", name, got, ideal, a, b, c);
    end
  endtask

  initial begin
    real ea, eb;
    {a, b, c} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: begin a = 8'sd127;  b = -8'sd128; c = -8'sd128; end
        1: begin a = -8'sd128; b = 8'sd127;  c = 8'sd127;  end
        2: begin a = 8'sd0;    b = 8'sd127;  c = -8'sd128; end
        3: begin a = 8'sd0;    b = -8'sd128; c = 8'sd127;  end
        default: begin a = sample_t'($urandom); b = sample_t'($urandom); c = sample_t'($urandom); end
      endcase
      ea = real'(a) - (real'(b) + real'(c)) / 2.0;
      eb = (real'(b) - real'(c)) * $sqrt(3.0) / 2.0;
      @(posedge clk);
      #1;
      chk("alpha", int'(alpha), ea);
      chk("beta", int'(beta), eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
