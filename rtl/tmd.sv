// tmd: in-situ timing margin detector of one bitslice.
//
// SDLOUT (the read data) and N_MDW copies of it delayed by margin detection
// windows (MDWs) are sampled by flip-flops on the same rising clock edge that
// captures the read (the start of 3H). If the read data changed less than one
// window before that edge, the delayed copy still holds the old value and the
// XOR of the two samples flags it: tmd_out[j] = 1 means "timing margin smaller
// than window j". Window 0 is MDW2 (TMDa, margin too small: slow down), window
// 1 is MDW1+MDW2 (TMDb, margin just right). The flags are valid for the whole
// cycle after the capture edge. The delay lines that form the windows sit
// outside this module. The flop-and-XOR structure and the two windows follow
// the published design; the asynchronous reset is this design's choice.
module tmd
  import rf_pkg::*;
#(
  parameter int unsigned NW = N_MDW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sdlout,
  input  logic [NW-1:0] del_sdlout,
  output logic [NW-1:0] tmd_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic          dout;
  logic [NW-1:0] del_dout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout     <= 1'b0;
      del_dout <= '0;
    end else begin
      dout     <= sdlout;
      del_dout <= del_sdlout;
    end
  end

  assign tmd_out = {NW{dout}} ^ del_dout;
endmodule
