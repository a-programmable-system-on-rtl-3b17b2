// sector_determination: which of six 60-degree sectors the current-error vector
// (alpha, beta) lies in ("sector_determination" in the controller schematic).
//
// The vector is projected back onto the three phase axes (times two, to stay in
// integers):
//     pa = 2*alpha,  pb = sqrt(3)*beta - alpha,  pc = -alpha - sqrt(3)*beta
// with sqrt(3) ~ 1 + 1/2 + 1/4 - 1/64 = 1.734 by shifts and adds. The signs of
// (pa, pb, pc) name the sector: 100 -> 1, 110 -> 2, 010 -> 3, 011 -> 4, 001 -> 5,
// 101 -> 6. Sector k thus spans -30..+30 degrees around the active inverter vector
// Vk at (k-1)*60 degrees. A zero vector (or a sign pattern that cannot arise from an
// exact projection) gives SEC_NONE. That sectors are used is the document's; their
// placement and numbering are this design's.
//
// Ports: alpha/beta (IN_W bits) in; sector (sector_e, 3 bits) out.
// Timing: one register stage. rst is synchronous, active high, and gives SEC_NONE.
module sector_determination
  import apf_pkg::*;
#(
  parameter int IN_W = 10
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] alpha,
  input  logic signed [IN_W-1:0] beta,
  output sector_e                sector
);

  logic signed [IN_W+2:0] al, be, k3, pa, pb, pc;
  logic [2:0]             sgn;
  sector_e                sec_c;

  always_comb begin
    al  = (IN_W+3)'(alpha);
    be  = (IN_W+3)'(beta);
    k3  = be + (be >>> 1) + (be >>> 2) - (be >>> 6);
    pa  = al <<< 1;
    pb  = k3 - al;
    pc  = -al - k3;
    sgn = {pa > 0, pb > 0, pc > 0};
    case (sgn)
      3'b100:  sec_c = SEC_1;
      3'b110:  sec_c = SEC_2;
      3'b010:  sec_c = SEC_3;
      3'b011:  sec_c = SEC_4;
      3'b001:  sec_c = SEC_5;
      3'b101:  sec_c = SEC_6;
      default: sec_c = SEC_NONE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) sector <= SEC_NONE;
    else     sector <= sec_c;
  end

endmodule
