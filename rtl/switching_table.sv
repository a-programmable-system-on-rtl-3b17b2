// switching_table: turns the sector of the current error and the controller mode into
// the three inverter leg states pwma/pwmb/pwmc ("switching_table" in the controller
// schematic).
//
// In active mode the table applies the active vector that points into the sector of
// the error, so the inverter voltage pushes the current towards its reference:
// sector 1 -> 100, 2 -> 110, 3 -> 010, 4 -> 011, 5 -> 001, 6 -> 101. In zero mode it
// applies a zero vector, picking 111 when at least two legs are already high and 000
// otherwise, so that at most one leg switches. Without a sector (SEC_NONE) it also
// applies a zero vector. The vector table is the usual space-vector one; the document
// names the block only.
//
// Ports: sector (3 bits), active (mode, from the controller's mode flip-flop); pwma,
// pwmb, pwmc out. Timing: one register stage. rst (synchronous, active high) gives 000.
module switching_table
  import apf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sector_e sector,
  input  logic    active,
  output logic    pwma,
  output logic    pwmb,
  output logic    pwmc
);

  sw_state_t state, next;

  always_comb begin
    state = {pwma, pwmb, pwmc};
    if (active && sector != SEC_NONE)
      next = active_vector(sector);
    else if ((32'(state[2]) + 32'(state[1]) + 32'(state[0])) >= 2)
      next = 3'b111;
    else
      next = 3'b000;
  end

  always_ff @(posedge clk) begin
    if (rst) {pwma, pwmb, pwmc} <= 3'b000;
    else     {pwma, pwmb, pwmc} <= next;
  end

endmodule
