// pll_system: three-phase phase-locked loop of the active power filter controller
// ("PLL_System" in the RTL schematic).
//
// It tracks the phase of the three line voltages va/vb/vc and delivers unit-amplitude
// three-phase sines and cosines synchronised to them, the angle reference that a
// synchronous-reference-frame controller needs. The loop is the document's:
//   vd_trans      phase detector, vd = sum of v_x * cos_x (reference vd = 0)
//   pi_controller gains KP/KI with NP/NI shifters, giving a frequency word
//   output_trans  8-bit phase accumulator, quarter-wave sine table, post processor
// and the cosines of output_trans feed back to vd_trans, as in the schematic.
// Only the low 8 bits of the 16-bit PI output drive the 8-bit accumulator, as printed
// (dout(15:0) into din(7:0)); the upper byte of dout is left
// unused on purpose and lint reports it as such.
//
// Ports: the schematic's va_in/vb_in/vc_in (7:0), clk, rst, and cosa..cosc, sina..sinc
// (7:0); theta and vd are brought out besides, for observation.
// Timing: three register stages around the loop (detector, PI, oscillator) plus the
// oscillator output register. The line voltages must be of positive sequence and the
// loop locks when sina is in phase with va_in. Reset is synchronous, active high.
module pll_system
  import apf_pkg::*;
#(
  parameter int KP = 1,
  parameter int KI = 1,
  parameter int NP = 11,
  parameter int NI = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t va_in,
  input  sample_t vb_in,
  input  sample_t vc_in,
  output sample_t cosa,
  output sample_t cosb,
  output sample_t cosc,
  output sample_t sina,
  output sample_t sinb,
  output sample_t sinc,
  output phase_t  theta,
  output vd_t     vd
);

  vd_t dout;

  vd_trans m1 (
    .clk, .rst,
    .va_in, .vb_in, .vc_in,
    .va_cos_in(cosa), .vb_cos_in(cosb), .vc_cos_in(cosc),
    .vd
  );

  pi_controller #(.KP(KP), .KI(KI), .NP(NP), .NI(NI)) m2 (
    .clk, .rst,
    .din(vd),
    .dout
  );

  output_trans m3 (
    .clk, .rst,
    .din(phase_t'(dout)),
    .theta,
    .cosa, .cosb, .cosc,
    .sina, .sinb, .sinc
  );

endmodule
