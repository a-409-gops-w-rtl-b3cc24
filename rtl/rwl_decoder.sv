// rwl_decoder: read address decoder and wordline generator of a sub-array.
//
// The read request (rd_en, raddr) is registered on the rising clock edge that
// starts the read cycle. The selected read wordline is high for the clock-high
// (evaluate) phase of that cycle and low during the precharge phase, so a
// read issued at edge k drives its wordline during the first half of cycle k.
// The published design names the decoder and wordline generator without
// detailing them; the registered, clock-gated one-hot decode is this design's
// own choice.
module rwl_decoder
  import rf_pkg::*;
#(
  parameter int unsigned N_ROWS = ENTRIES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      rd_en,
  input  logic [$clog2(N_ROWS)-1:0] raddr,
  output logic [N_ROWS-1:0]         rwl
);
  timeunit 1ps;
  timeprecision 1ps;

  logic                      en_q;
  logic [$clog2(N_ROWS)-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q   <= 1'b0;
      addr_q <= '0;
    end else begin
      en_q   <= rd_en;
      addr_q <= raddr;
    end
  end

  always_comb begin
    rwl = '0;
    if (clk && en_q) rwl[addr_q] = 1'b1;
  end
endmodule
