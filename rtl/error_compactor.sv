// error_compactor: error compaction of one sub-array.
//
// MODE picks, per bitslice, the timing error flag (0) or the timing margin
// flag (1). The flags of bitslices 0..15 and 16..31 drive two wide domino
// error bitlines (ERR BL1, ERR BL2): each is precharged high while the clock
// is high and pulled low during the low phase (3L) when any of its 16 flags is
// set, i.e. a 16-input NOR. A NAND of the two bitlines gives ERR COMPACT, which
// a flip-flop captures at the next rising edge (start of 4H): err_compact_ff is
// high for the cycle after, two clock edges after the read was captured.
// Structure and timing follow the published design. The domino bitlines are
// modelled as holding their evaluated value while the clock is high (a latch
// transparent in the low phase) so that the capturing flop sees a stable
// value at the edge; the latches are intentional.
module error_compactor
  import rf_pkg::*;
#(
  parameter int unsigned N_BITS = WIDTH,
  parameter int unsigned PER_BL = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,
  input  logic [N_BITS-1:0] ted_out,
  input  logic [N_BITS-1:0] tmd_out,
  output logic              err_compact_ff
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_BL = (N_BITS + PER_BL - 1) / PER_BL;

  logic [N_BITS-1:0] err;
  logic [N_BL-1:0]   err_bl;       // high = precharged, no error
  logic              err_compact;

  assign err = mode ? tmd_out : ted_out;

  for (genvar b = 0; b < N_BL; b++) begin : g_bl
    localparam int unsigned LO = b * PER_BL;
    localparam int unsigned HI = (LO + PER_BL < N_BITS) ? LO + PER_BL : N_BITS;
    always_latch begin
      if (!clk) err_bl[b] = ~(|err[HI-1:LO]);
    end
  end

  assign err_compact = ~(&err_bl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_compact_ff <= 1'b0;
    else        err_compact_ff <= err_compact;
  end
endmodule
