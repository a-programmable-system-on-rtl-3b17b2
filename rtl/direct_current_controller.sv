// direct_current_controller: space-vector hysteresis current controller of the active
// power filter ("Direct_current_contorller" in the RTL schematic).
//
// The inputs delia/delib/delic are the three phase-current errors (reference minus
// measured compensating current). The controller works on the error as one vector:
//   three2twophase           alpha/beta of the error (shifts and adds)
//   sector_determination     which 60-degree sector the error points into
//   magnitude_determination  whether |error| is inside the inner band mi or beyond
//                            the outer band mo
//   mode flip-flop (fdc)     the hysteresis state: set when |error| > mo, cleared
//                            when |error| < mi, held in between
//   switching_table          active vector of the sector while the mode is set, a
//                            zero vector otherwise
// So an error that grows past mo triggers the inverter vector that drives it back,
// which stays applied (following the sector) until the error has shrunk below mi;
// the legs then rest on a zero vector until the error reaches mo again. The block
// split, the two band inputs and the separate flip-flop are the schematic's; what each
// block computes inside is this design's reading of their names.
//
// Ports: delia, delib, delic, mi, mo (7:0), clk, rst in; pwma, pwmb, pwmc out (as in
// the schematic); sector and active brought out for observation.
// Timing: three register stages from the error inputs to the leg states. Reset is
// synchronous, active high; the legs reset to 000 and the mode to zero.
module direct_current_controller
  import apf_pkg::*;
#(
  parameter int AB_W = 10
) (
  input  logic                clk,
  input  logic                rst,
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

  logic signed [AB_W-1:0] alpha, beta;
  logic                   inner, outer;
  logic                   mode_d, mode_q;

  three2twophase #(.OUT_W(AB_W)) m1 (
    .clk, .rst, .delia, .delib, .delic, .alpha, .beta
  );

  sector_determination #(.IN_W(AB_W)) m2 (
    .clk, .rst, .alpha, .beta, .sector
  );

  magnitude_determination #(.IN_W(AB_W)) m3 (
    .clk, .rst, .alpha, .beta, .mi, .mo, .inner, .outer
  );

  // Mode flip-flop (the schematic's fdc): hysteresis between the two bands.
  always_comb mode_d = outer | (mode_q & ~inner);

  always_ff @(posedge clk) begin
    if (rst) mode_q <= 1'b0;
    else     mode_q <= mode_d;
  end

  assign active = mode_q;

  switching_table m4 (
    .clk, .rst, .sector, .active(mode_d), .pwma, .pwmb, .pwmc
  );

endmodule
