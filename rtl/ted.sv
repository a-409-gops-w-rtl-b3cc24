// ted: in-situ timing error detector of one bitslice.
//
// SDLOUT is sampled twice: by a flip-flop at the rising clock edge that ends
// the read cycle (start of 3H), giving dout, and by a latch that is transparent
// while the clock is high (3H) and closes at the falling edge (start of 3L),
// giving dout_lat. A read that arrives late, inside 3H, is missed by the flop
// but caught by the latch, so ted_out = dout ^ dout_lat is 1 during 3L and
// dout_lat holds the correct data. The detection window is thus half a clock
// cycle. This relies on the next read not changing SDLOUT before 3L, which the
// read path guarantees by delivering nominal reads after mid-cycle.
// The latch is intentional: it is the second sampling element of the
// published circuit. Flop-then-latch order follows the published circuit; the
// asynchronous reset of the flop is this design's choice.
module ted (
  input  logic clk,
  input  logic rst_n,
  input  logic sdlout,
  output logic dout,
  output logic dout_lat,
  output logic ted_out
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= sdlout;
  end

  always_latch begin
    if (clk) dout_lat = sdlout;
  end

  assign ted_out = dout ^ dout_lat;
endmodule
