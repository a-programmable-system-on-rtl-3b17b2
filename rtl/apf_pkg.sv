// apf_pkg: types and constants shared by the FPGA part of the active power filter
// controller (three-phase PLL and directed current controller).
//
// Samples travel as 8-bit two's-complement words, the width printed on every port of
// the PLL and current-controller schematics. The phase of the PLL is an 8-bit word
// (256 steps per cycle), which is the width of its "8-bit adder generator".
// The inverter switch state is a 3-bit word {a,b,c}; 1 means the upper switch of that
// leg is on. The six active states and the two zero states follow the usual
// space-vector numbering (V1 = 100 at 0 degrees, V2 = 110 at 60 degrees, ...).
package apf_pkg;

  localparam int unsigned SAMPLE_W = 8;    // ADC sample / sine word width
  localparam int unsigned PHASE_W  = 8;    // PLL phase accumulator width
  localparam int unsigned VD_W     = 16;   // phase-detector and PI word width

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic signed [VD_W-1:0]     vd_t;

  // Sector of the current-error vector; each sector spans 60 degrees and is centred
  // on the active voltage vector of the same number.
  typedef enum logic [2:0] {
    SEC_NONE = 3'd0,
    SEC_1 = 3'd1, SEC_2 = 3'd2, SEC_3 = 3'd3,
    SEC_4 = 3'd4, SEC_5 = 3'd5, SEC_6 = 3'd6
  } sector_e;

  typedef logic [2:0] sw_state_t;   // {a, b, c}

  // Active vector that points at the centre of a sector.
  function automatic sw_state_t active_vector(sector_e s);
    case (s)
      SEC_1:   return 3'b100;
      SEC_2:   return 3'b110;
      SEC_3:   return 3'b010;
      SEC_4:   return 3'b011;
      SEC_5:   return 3'b001;
      SEC_6:   return 3'b101;
      default: return 3'b000;
    endcase
  endfunction

  // Saturate a wide signed value to VD_W bits.
  function automatic vd_t sat_vd(logic signed [39:0] x);
    localparam logic signed [39:0] MAXV = 40'sd32767;
    localparam logic signed [39:0] MINV = -40'sd32768;
    if (x > MAXV)      return vd_t'(MAXV);
    else if (x < MINV) return vd_t'(MINV);
    else               return vd_t'(x);
  endfunction

endpackage
