// tb_switching_table: directed test of the vector table. In active mode each sector
// must give its active vector (1:100 2:110 3:010 4:011 5:001 6:101) one clock later.
// In zero mode the table must rest on 111 when two or more legs were high and on 000
// otherwise, and SEC_NONE must behave like zero mode.
module tb_switching_table;
  import apf_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  sector_e sector;
  logic active, pwma, pwmb, pwmc;
  int checks = 0, failures = 0;
  logic [2:0] vec [1:6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  switching_table dut (.clk, .rst, .sector, .active, .pwma, .pwmb, .pwmc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(sector_e s, logic act, logic [2:0] expected);
    sector = s;
    active = act;
    @(posedge clk);
    #1;
    checks++;
    if ({pwma, pwmb, pwmc} != expected) begin
      failures++;
      $display("sector=%0d active=%0d: legs=%b expected %b", s, act, {pwma, pwmb, pwmc}, expected);
    end
  endtask

  initial begin
    sector = SEC_NONE;
    active = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if ({pwma, pwmb, pwmc} != 3'b000) begin failures++; $display("not 000 after reset"); end
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 1; k <= 6; k++) begin
        // active vector, then zero mode from it
        apply(sector_e'(k), 1'b1, vec[k]);
        apply(sector_e'(k), 1'b0, ($countones(vec[k]) >= 2) ? 3'b111 : 3'b000);
        // zero mode holds the zero vector it chose
        apply(sector_e'($urandom_range(1, 6)), 1'b0, ($countones(vec[k]) >= 2) ? 3'b111 : 3'b000);
        // from a zero vector, active mode goes straight to the sector's vector
        apply(sector_e'(7 - k), 1'b1, vec[7 - k]);
        apply(SEC_NONE, 1'b1, ($countones(vec[7 - k]) >= 2) ? 3'b111 : 3'b000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
