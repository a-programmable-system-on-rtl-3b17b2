// vd_trans: phase detector of the three-phase PLL ("Vd_trans" in the PLL schematic).
//
// It forms the d-axis voltage of the synchronous reference frame,
//     vd = va*cosa + vb*cosb + vc*cosc,
// from the three line voltages and the three cosines fed back from the PLL output.
// With va = V sin(phi), vb = V sin(phi-120), vc = V sin(phi+120) and cosines of the
// PLL angle theta, vd = 1.5 * V * 127 * sin(phi - theta): zero when the loop is locked
// and signed like the phase error, so vd is the loop error the PI controller drives to
// its reference of zero. The ports (three voltages, three cosines, a 16-bit vd) are the
// schematic's; the exact formula, the two's-complement number format and the
// saturation to 16 bits are this design's choices.
//
// Timing: one register stage; vd is valid one clock after its inputs. rst is
// synchronous and active high and clears vd.
module vd_trans
  import apf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t va_in,
  input  sample_t vb_in,
  input  sample_t vc_in,
  input  sample_t va_cos_in,
  input  sample_t vb_cos_in,
  input  sample_t vc_cos_in,
  output vd_t     vd
);

  logic signed [2*SAMPLE_W-1:0] pa, pb, pc;
  logic signed [39:0]           sum;

  always_comb begin
    pa  = va_in * va_cos_in;
    pb  = vb_in * vb_cos_in;
    pc  = vc_in * vc_cos_in;
    sum = 40'(pa) + 40'(pb) + 40'(pc);
  end

  always_ff @(posedge clk) begin
    if (rst) vd <= '0;
    else     vd <= sat_vd(sum);
  end

endmodule
