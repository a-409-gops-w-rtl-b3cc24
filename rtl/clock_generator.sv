// clock_generator: behavioural model of the adaptive clock source (an analog
// oscillator, so it has no synthesizable equivalent).
//
// The clock period is T_BASE_PS - f_code * T_STEP_PS picoseconds (higher code
// = higher frequency), doubled while f_half is high: the register file replays
// failed reads at half frequency. A new setting takes effect at the next
// rising edge. The clock starts low and the first rising edge comes half a
// period after time 0. The F and F/2 selection follows the published system
// diagram; the period formula and values are this model's assumptions (the
// default base period is about the 860 MHz of the guard-banded baseline).
module clock_generator #(
  parameter int unsigned CODE_W    = 6,
  parameter int unsigned T_BASE_PS = 1160,
  parameter int unsigned T_STEP_PS = 10
) (
  input  logic [CODE_W-1:0] f_code,
  input  logic              f_half,
  output logic              clk,
  output int unsigned       period_ps
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned cur;

  initial begin
    clk = 1'b0;
    forever begin
      cur = T_BASE_PS - int'(f_code) * T_STEP_PS;
      if (f_half) cur = 2 * cur;
      period_ps = cur;
      #(cur / 2) clk = 1'b1;
      #(cur - cur / 2) clk = 1'b0;
    end
  end
endmodule
