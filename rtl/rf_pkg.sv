// rf_pkg: organisation constants shared by the resilient domino register file.
// A 4 Kb sub-array holds 128 entries of 32 bits. Each 128-bit bitslice is split
// into local bitlines (LBLs) of 16 cells; a 2-input merge-NAND joins two LBLs,
// two merge-NANDs drive one global bitline (GBL), and two GBLs feed the
// set-dominant latch (SDL) that produces the read data. The resilient array
// has 14 such sub-arrays (7 KB). The 4 merge-NANDs and 2 GBLs per bitslice are
// fixed by the read-path model (domino_read_array) rather than parameters here. These numbers follow the published design;
// the 2-bit width of the delay settings follows its circuit drawings.
package rf_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned ENTRIES        = 128;
  localparam int unsigned WIDTH          = 32;
  localparam int unsigned CELLS_PER_LBL  = 16;
  localparam int unsigned LBLS           = ENTRIES / CELLS_PER_LBL;  // 8 per bitslice
  localparam int unsigned N_SUB          = 14;                       // sub-arrays in 7 KB
  localparam int unsigned SEL_W          = 2;                        // delay setting width
  localparam int unsigned N_MDW          = 2;                        // TMDa, TMDb

  // Per-sub-array tuning settings (the test chip loads these by scan).
  typedef struct packed {
    logic [SEL_W-1:0] mdw2_sel;     // TMDa window (MDW2)
    logic [SEL_W-1:0] mdw12_sel;    // TMDb window (MDW1 + MDW2)
    logic [SEL_W-1:0] pch_sel;      // delayed bitline precharge
    logic [SEL_W-1:0] clkb_sel;     // DEL CLKB for the SDL
  } rf_tune_t;
endpackage
