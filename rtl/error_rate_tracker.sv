// error_rate_tracker: counts detected read timing errors over a sampling
// period of PERIOD cycles. At the end of each period, if the count exceeded
// threshold, erte (error rate tracker exceeded) is high for one cycle, telling
// the V/F adaptation controller to back off; the count then restarts. A high
// error rate means the replay overhead is eating the gain of the higher
// frequency, or that the margin detector has been misled (for example by a
// metastable sample). The tracker and its threshold are part of the published
// scheme; the period, the counter width and the one-cycle pulse are this
// design's choices.
module error_rate_tracker #(
  parameter int unsigned PERIOD = 1024,
  parameter int unsigned CNT_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             err,
  input  logic [CNT_W-1:0] threshold,
  output logic             erte,
  output logic [CNT_W-1:0] last_count
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [$clog2(PERIOD)-1:0] tick;
  logic [CNT_W-1:0]          count;
  logic                      period_end;

  assign period_end = (tick == PERIOD[$clog2(PERIOD)-1:0] - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick       <= '0;
      count      <= '0;
      erte       <= 1'b0;
      last_count <= '0;
    end else begin
      erte <= 1'b0;
      if (period_end) begin
        tick       <= '0;
        count      <= '0;
        last_count <= count + CNT_W'(err);
        erte       <= (count + CNT_W'(err)) > threshold;
      end else begin
        tick <= tick + 1'b1;
        if (err && count != '1) count <= count + 1'b1;
      end
    end
  end
endmodule
