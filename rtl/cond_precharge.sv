// cond_precharge: conditional delayed bitline precharge control for one pair
// of local bitlines (LBLs) that share a merge-NAND.
//
// The LBL precharge devices P1/P2 are driven by DEL LBL PCH, a precharge pulse
// that starts when the delayed inverted clock del_pchb rises (set by the
// bitline precharge delay setting) and ends at the rising clock edge. Delaying
// the precharge gives a slow ("weak-1") bitline more time to reach the
// set-dominant latch, turning a would-be sensing failure into a timing error
// the detector can see. The merge-NAND output picks how the EQ1 equaliser
// between the two LBLs is driven:
//   NAOUT = 1 (nominal bit, evaluated in the high phase): EQ1 turns on with
//            CLKB at the start of the low phase, sharing charge with the
//            neighbouring precharged LBL to speed up the shortened precharge;
//   NAOUT = 0 (weak 1 or read 0): EQ1 turns on with the delayed precharge,
//            together with P1 and P2.
// The multiplexer and the conditions follow the published circuit. This
// design's own choices: the multiplexer select is NAOUT as sampled at the
// falling clock edge and held for the low phase (the published waveform keeps
// EQ1 off although NAOUT rises late in that phase), and the delayed precharge
// is cut off at the rising clock edge so it never overlaps the next read.
module cond_precharge (
  input  logic clk,       // CLKB = ~clk
  input  logic rst_n,
  input  logic naout,
  input  logic del_pchb,  // CLKB through the precharge delay line
  output logic lbl_pch,   // DEL LBL PCH to P1/P2
  output logic eq_en      // EQ1 EN
);
  timeunit 1ps;
  timeprecision 1ps;

  logic sel_q;
  logic clkb;
  logic del_pch;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= 1'b0;
    else        sel_q <= naout;
  end

  assign clkb    = ~clk;
  assign del_pch = clkb & del_pchb;
  assign lbl_pch = del_pch;
  assign eq_en   = sel_q ? clkb : del_pch;
endmodule
