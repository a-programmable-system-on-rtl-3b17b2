// tb_sector_determination: self-checking test of the sector decision. Random error
// vectors are applied; the expected sector comes from the vector's angle (atan2 in
// floating point): sector k spans (k-1)*60 -/+ 30 degrees. Vectors within 1.5 degrees
// of a boundary, where the shift-and-add sqrt(3) may decide either way, are not
// counted. The zero vector must give SEC_NONE.
module tb_sector_determination;
  import apf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [9:0] alpha, beta;
  sector_e sector;
  int checks = 0, failures = 0;
  int seen [7];

  sector_determination dut (.clk, .rst, .alpha, .beta, .sector);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, rel;
    int exp_sec;
    alpha = '0; beta = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (sector != SEC_NONE) begin
      failures++;
      $display("zero vector gave sector %0d", sector);
    end
    for (int n = 0; n < 5000; n++) begin
      alpha = 10'($signed($urandom_range(0, 600)) - 300);
      beta  = 10'($signed($urandom_range(0, 600)) - 300);
      if (alpha == 0 && beta == 0) alpha = 10'sd1;
      ang = $atan2(real'(beta), real'(alpha)) * 180.0 / PI;   // -180..180
      if (ang < -30.0) ang += 360.0;                            // -30..330
      exp_sec = $rtoi($floor((ang + 30.0) / 60.0)) + 1;
      rel = (ang + 30.0) - 60.0 * $floor((ang + 30.0) / 60.0);  // 0..60 inside sector
      @(posedge clk);
      #1;
      if (rel < 1.5 || rel > 58.5) continue;
      checks++;
      seen[int'(sector)]++;
      if (int'(sector) != exp_sec) begin
        failures++;
        if (failures < 10) $display("alpha=%0d beta=%0d angle=%f sector=%0d expected %0d",
                                    alpha, beta, ang, sector, exp_sec);
      end
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("sector %0d never seen", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
