// magnitude_determination: compares the length of the current-error vector with the
// inner and outer hysteresis bands of the directed current controller
// ("magnitude_determination" in the controller schematic; the bands are the
// controller's mi and mo inputs).
//
// The squared length alpha^2 + beta^2 is compared with mi^2 and mo^2, so no square
// root is needed: two squarers and two comparators.
//     inner = |e| <  mi      (error small enough for a zero vector)
//     outer = |e| >  mo      (error too large: apply an active vector)
// mi and mo are unsigned and in the units of alpha and beta (1.5 times the phase-
// current error). Comparing squares is this design's choice; the document gives only
// the block's name and its mi/mo inputs.
//
// Timing: one register stage, aligned with sector_determination. rst (synchronous,
// active high) clears both flags.
module magnitude_determination
  import apf_pkg::*;
#(
  parameter int IN_W = 10
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] alpha,
  input  logic signed [IN_W-1:0] beta,
  input  logic [SAMPLE_W-1:0]    mi,
  input  logic [SAMPLE_W-1:0]    mo,
  output logic                   inner,
  output logic                   outer
);

  localparam int SQ_W = 2*IN_W + 1;

  typedef logic signed [SQ_W-1:0] sq_t;

  logic [SQ_W-1:0] mag2, mi2, mo2;

  always_comb begin
    mag2 = SQ_W'(sq_t'(alpha) * sq_t'(alpha)) + SQ_W'(sq_t'(beta) * sq_t'(beta));
    mi2  = SQ_W'(mi) * SQ_W'(mi);
    mo2  = SQ_W'(mo) * SQ_W'(mo);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      inner <= 1'b0;
      outer <= 1'b0;
    end else begin
      inner <= mag2 < mi2;
      outer <= mag2 > mo2;
    end
  end

endmodule
