// output_trans: numerically controlled oscillator of the three-phase PLL ("trans" in
// the PLL schematic): an 8-bit adder generator, a sine table and a post processor.
//
// The 8-bit adder generator is a phase accumulator, theta <= theta + din, so din is the
// phase step per clock (256 steps = one cycle). The sine table holds one quarter wave,
// 64 entries of round(127*sin((i+0.5)*90/64 degrees)); sampling the quarter wave at
// half-step points makes the mirrored quadrants meet without a repeated value. The
// post processor folds any 8-bit angle onto that quarter wave: bit 6 of the angle
// mirrors the table index and bit 7 negates the result. Six angles are looked up every
// clock: theta, theta-120 and theta+120 degrees for the sines, and the same three plus
// 90 degrees for the cosines. 120 degrees is 85 phase steps (256/3 = 85.33 rounded).
//
// Ports follow the schematic: din(7:0), clk, rst in; cosa..cosc and sina..sinc (7:0)
// out, all two's complement with full scale +-127.
// Timing: theta is a register; the six outputs are registered from theta, so they lag
// the phase register by one clock. rst (synchronous, active high) sets theta to zero
// and the outputs to the values for angle zero.
module output_trans
  import apf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  phase_t  din,
  output phase_t  theta,
  output sample_t cosa,
  output sample_t cosb,
  output sample_t cosc,
  output sample_t sina,
  output sample_t sinb,
  output sample_t sinc
);

  localparam int QW = 64;   // quarter-wave table length

  // One third of a cycle in phase steps: 256/3 = 85.33, rounded to 85.
  localparam phase_t PHASE_120 = phase_t'(85);
  // A quarter cycle.
  localparam phase_t PHASE_90  = phase_t'(64);

  typedef logic [SAMPLE_W-2:0] mag_t;   // table entries are 0..127
  typedef mag_t qtable_t [QW];

  function automatic qtable_t make_table();
    qtable_t t;
    for (int i = 0; i < QW; i++)
      t[i] = mag_t'($rtoi(127.0 * $sin(3.14159265358979 / 2.0 * (real'(i) + 0.5) / real'(QW)) + 0.5));
    return t;
  endfunction

  localparam qtable_t SINE_Q = make_table();

  // Post processor: sine of an 8-bit angle from the quarter-wave table.
  function automatic sample_t sine_of(phase_t a);
    logic [5:0] idx;
    mag_t       m;
    idx = a[6] ? ~a[5:0] : a[5:0];
    m   = SINE_Q[idx];
    return a[7] ? -sample_t'({1'b0, m}) : sample_t'({1'b0, m});
  endfunction

  always_ff @(posedge clk) begin
    if (rst) theta <= '0;
    else     theta <= theta + din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sina <= sine_of('0);
      sinb <= sine_of(-PHASE_120);
      sinc <= sine_of(PHASE_120);
      cosa <= sine_of(PHASE_90);
      cosb <= sine_of(PHASE_90 - PHASE_120);
      cosc <= sine_of(PHASE_90 + PHASE_120);
    end else begin
      sina <= sine_of(theta);
      sinb <= sine_of(theta - PHASE_120);
      sinc <= sine_of(theta + PHASE_120);
      cosa <= sine_of(theta + PHASE_90);
      cosb <= sine_of(theta + PHASE_90 - PHASE_120);
      cosc <= sine_of(theta + PHASE_90 + PHASE_120);
    end
  end

endmodule
