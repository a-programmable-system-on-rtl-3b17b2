// apf_fpga_top: the FPGA part of the active-power-filter controller. It holds the two
// units the FPGA carries: the three-phase PLL that locks to the line voltages, and the
// directed current controller that turns the compensating-current errors into inverter
// leg states.
//
// The two units share the clock and reset and nothing else: the path from the PLL's
// sines through a reference-current calculation to the current errors is not part of
// this FPGA design, so the PLL's sines/cosines and the controller's error inputs are
// ports. The line voltages come from an ADC and the current errors from the
// surrounding system; both are 8-bit two's-complement words.
//
// Timing: PLL as in pll_system (the loop locks within a few hundred clocks for a
// near-full-scale input), controller three clocks from error to leg state.
// rst is synchronous and active high.
module apf_fpga_top
  import apf_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // three-phase PLL
  input  sample_t             va_in,
  input  sample_t             vb_in,
  input  sample_t             vc_in,
  output sample_t             cosa,
  output sample_t             cosb,
  output sample_t             cosc,
  output sample_t             sina,
  output sample_t             sinb,
  output sample_t             sinc,
  output phase_t              theta,
  output vd_t                 vd,
  // directed current controller
  input  sample_t             delia,
  input  sample_t             delib,
  input  sample_t             delic,
  input  logic [SAMPLE_W-1:0] mi,
  input  logic [SAMPLE_W-1:0] mo,
  output logic                pwma,
  output logic                pwmb,
  output logic                pwmc,
  output sector_e             sector,
  output logic                active
);

  pll_system u_pll (
    .clk, .rst,
    .va_in, .vb_in, .vc_in,
    .cosa, .cosb, .cosc, .sina, .sinb, .sinc,
    .theta, .vd
  );

  direct_current_controller u_dcc (
    .clk, .rst,
    .delia, .delib, .delic, .mi, .mo,
    .pwma, .pwmb, .pwmc,
    .sector, .active
  );

endmodule
