// prog_delay_line: behavioural model of a programmable delay element (an
// analog inverter/multiplexer chain, so it has no synthesizable equivalent).
//
// Each of the N bits of y follows the same bit of a after T_FIXED_PS + sel * T_STEP_PS picoseconds (transport delay:
// every edge of a is reproduced). The register file uses it for the margin
// detection windows of the timing margin detector, for the delayed bitline
// precharge and for the delayed inverted clock of the set-dominant latch.
// The structure -- a fixed delay of two multiplexer stages plus steps of two
// inverter delays, chosen by a 2-bit setting -- follows the published circuit;
// the picosecond values are this model's assumptions.
module prog_delay_line #(
  parameter int unsigned N          = 1,
  parameter int unsigned SEL_W      = 2,
  parameter int unsigned T_FIXED_PS = 40,
  parameter int unsigned T_STEP_PS  = 30
) (
  input  logic [N-1:0]     a,
  input  logic [SEL_W-1:0] sel,
  output logic [N-1:0]     y
);
  timeunit 1ps;
  timeprecision 1ps;

  initial y = '0;

  always @(a) begin
    automatic logic [N-1:0] v = a;
    automatic int unsigned  d = T_FIXED_PS + int'(sel) * T_STEP_PS;
    fork
      begin
        #(d) y = v;
      end
    join_none
  end
endmodule
