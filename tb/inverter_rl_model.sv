// inverter_rl_model: behavioural model (not synthesizable, simulation only) of the
// power stage the current controller drives: a two-level three-phase voltage-source
// inverter feeding the line through one filter inductor per phase, three-wire, with
// the line voltage as a back EMF.
//
// Every clock each phase current moves by
//     di_x = G * (VDC * (s_x - (s_a + s_b + s_c)/3) - e_x)
// where s_x is the leg state, VDC_G = G*VDC is the current slope one volt-second unit
// of dc bus gives per clock, and e_x (already scaled by G) is the line voltage
// behind the inductor. Resistance is neglected. Currents are in ADC LSB units.
module inverter_rl_model #(
  parameter real VDC_G = 6.0
) (
  input  logic clk,
  input  logic rst,
  input  logic sa,
  input  logic sb,
  input  logic sc,
  input  real  ea,
  input  real  eb,
  input  real  ec,
  output real  ia,
  output real  ib,
  output real  ic
);

  real vn;

  always_comb vn = (real'(sa) + real'(sb) + real'(sc)) / 3.0;

  always @(posedge clk) begin
    if (rst) begin
      ia <= 0.0;
      ib <= 0.0;
      ic <= 0.0;
    end else begin
      ia <= ia + VDC_G * (real'(sa) - vn) - ea;
      ib <= ib + VDC_G * (real'(sb) - vn) - eb;
      ic <= ic + VDC_G * (real'(sc) - vn) - ec;
    end
  end

endmodule
