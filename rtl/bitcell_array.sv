// bitcell_array: storage of one register-file sub-array (ENTRIES x WIDTH 8T
// 1R1W cells) with a static write port and the single-ended read port.
//
// Write: on the rising clock edge, row waddr takes wdata when wwl_en is high.
// The write path is built to work under worst-case conditions, so it carries no
// error detection.
// Read: the read port is combinational. For each bitslice b and local bitline
// l, lbl_pull[b][l] is high when one of the 16 cells on that LBL has its read
// wordline (rwl) high and stores a 1, i.e. when that cell's read stack
// discharges the precharged LBL. A stored 0 leaves the LBL high.
// The cell organisation (16 cells per LBL) follows the published design; the
// edge-triggered write and the "1 discharges" polarity are this design's
// reading of its schematics. The storage has no reset.
module bitcell_array
  import rf_pkg::*;
#(
  parameter int unsigned N_ROWS  = ENTRIES,
  parameter int unsigned N_BITS  = WIDTH,
  parameter int unsigned PER_LBL = CELLS_PER_LBL
) (
  input  logic                              clk,
  input  logic                              wwl_en,
  input  logic [$clog2(N_ROWS)-1:0]         waddr,
  input  logic [N_BITS-1:0]                 wdata,
  input  logic [N_ROWS-1:0]                 rwl,
  output logic [N_BITS-1:0][N_ROWS/PER_LBL-1:0] lbl_pull
);
  timeunit 1ps;
  timeprecision 1ps;


  logic [N_BITS-1:0] mem [N_ROWS];

  always_ff @(posedge clk) begin
    if (wwl_en) mem[waddr] <= wdata;
  end

  always_comb begin
    lbl_pull = '0;
    for (int unsigned r = 0; r < N_ROWS; r++) begin
      for (int unsigned b = 0; b < N_BITS; b++) begin
        if (rwl[r] && mem[r][b]) lbl_pull[b][r / PER_LBL] = 1'b1;
      end
    end
  end
endmodule
