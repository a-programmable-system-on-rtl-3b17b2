// pi_controller: loop filter of the three-phase PLL ("PI_controller" in the PLL
// schematic).
//
// The loop error din (vd, whose reference is zero) is multiplied by the gains KP and
// KI; each product is then scaled down by an arithmetic right shift of NP or NI bits
// (the "Np and Ni shifters"), and the two are added:
//     acc  <= acc + KI*din                        (integral path, kept at full precision)
//     dout <= sat16( (KP*din >>> NP) + (acc >>> NI) )
// dout is the frequency word of the phase accumulator that follows. Keeping the
// integrator unshifted and shifting only its output lets it hold the fractional
// frequency between updates. The gain and shift values are not published; the
// defaults here were chosen so that the loop locks on a 400-clock-or-less time scale
// for 8-bit inputs of amplitude near full scale.
//
// Timing: one register stage from din to dout. rst (synchronous, active high) clears
// the integrator and the output.
module pi_controller
  import apf_pkg::*;
#(
  parameter int KP    = 1,
  parameter int KI    = 1,
  parameter int NP    = 11,
  parameter int NI    = 16,
  parameter int ACC_W = 32
) (
  input  logic clk,
  input  logic rst,
  input  vd_t  din,
  output vd_t  dout
);

  logic signed [ACC_W-1:0] acc;
  logic signed [39:0]      p_term, i_term, sum;

  always_comb begin
    p_term = (40'(din) * 40'(KP)) >>> NP;
    i_term = 40'(acc >>> NI);
    sum    = p_term + i_term;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      dout <= '0;
    end else begin
      acc  <= acc + ACC_W'(40'(din) * 40'(KI));
      dout <= sat_vd(sum);
    end
  end

endmodule
