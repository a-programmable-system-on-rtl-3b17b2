// three2twophase: three-phase to two-phase (Clarke) transform of the current errors,
// built from shifters and adders only, as the directed current controller's first
// stage ("three2twophase" in the controller schematic).
//
//     alpha = a - (b + c)/2                     exact: one add, one 1-bit shift
//     beta  = (b - c) * sqrt(3)/2               sqrt(3)/2 ~ (8 - 1 - 1/16)/8 = 0.8672,
//                                               rounded to nearest after the /8
// Both axes carry 1.5 times the amplitude of a balanced three-phase input, so the
// error vector keeps its shape; the sqrt(3)/2 constant is approximated to 0.13 %.
// The shift-and-add form is the document's; the exact constants and the non-power-
// invariant scaling are this design's choice.
//
// Ports: delia/delib/delic (7:0, two's complement) in; alpha/beta (OUT_W bits, two's
// complement) out. Timing: one register stage. rst is synchronous, active high.
module three2twophase
  import apf_pkg::*;
#(
  parameter int OUT_W = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  sample_t                 delia,
  input  sample_t                 delib,
  input  sample_t                 delic,
  output logic signed [OUT_W-1:0] alpha,
  output logic signed [OUT_W-1:0] beta
);

  // OUT_W >= SAMPLE_W + 2 holds every result without overflow; the beta product is
  // formed three bits wider before its final shift.
  logic signed [OUT_W-1:0] a, b, c, bc_sum, bc_dif, alpha_c;
  logic signed [OUT_W+2:0] d8, beta8;

  always_comb begin
    a       = OUT_W'(delia);
    b       = OUT_W'(delib);
    c       = OUT_W'(delic);
    bc_sum  = b + c;
    bc_dif  = b - c;
    alpha_c = a - (bc_sum >>> 1);
    d8      = (OUT_W+3)'(bc_dif);
    beta8   = (d8 <<< 3) - d8 - (d8 >>> 4) + (OUT_W+3)'(4);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      alpha <= '0;
      beta  <= '0;
    end else begin
      alpha <= alpha_c;
      beta  <= OUT_W'(beta8 >>> 3);
    end
  end

endmodule
