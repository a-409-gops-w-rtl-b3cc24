// vf_adaptation_controller: slow voltage/frequency adaptation driven by the
// timing margin detectors and the error rate tracker.
//
// Over each adaptation period of PERIOD cycles it records whether any read
// showed a margin smaller than MDW2 (tmda), smaller than MDW1+MDW2 (tmdb), and
// whether the error rate tracker fired (erte). At the end of the period:
//   tmda or erte seen         -> slow down: f_code - 1 (adapt_v = 0) or
//                                v_code + 1 (adapt_v = 1)
//   only tmdb seen            -> keep the operating point
//   neither seen, reads done  -> speed up: f_code + 1 or v_code - 1
//   no read in the period     -> keep (nothing was measured)
// Codes saturate at 0 and all ones. f_code sets the clock generator (higher =
// faster), v_code the voltage regulator (higher = more supply). step pulses
// for one cycle whenever a code changes. The decision table follows the
// published data-arrival scenarios; the one-step-per-period rule, the period
// and the code widths are this design's choices.
module vf_adaptation_controller #(
  parameter int unsigned PERIOD  = 256,
  parameter int unsigned CODE_W  = 6,
  parameter logic [CODE_W-1:0] F_INIT = '0,
  parameter logic [CODE_W-1:0] V_INIT = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adapt_v,
  input  logic              rd_evt,
  input  logic              tmda,
  input  logic              tmdb,
  input  logic              erte,
  output logic [CODE_W-1:0] f_code,
  output logic [CODE_W-1:0] v_code,
  output logic [1:0]        step      // [0] sped up, [1] slowed down
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {KEEP, FASTER, SLOWER} dir_t;

  logic [$clog2(PERIOD)-1:0] tick;
  logic                      seen_a, seen_b, seen_rd;
  dir_t                      dir;

  always_comb begin
    if (seen_a || tmda || erte)     dir = SLOWER;
    else if (seen_b || tmdb)        dir = KEEP;
    else if (seen_rd || rd_evt)     dir = FASTER;
    else                            dir = KEEP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick    <= '0;
      seen_a  <= 1'b0;
      seen_b  <= 1'b0;
      seen_rd <= 1'b0;
      f_code  <= F_INIT;
      v_code  <= V_INIT;
      step    <= '0;
    end else begin
      step <= '0;
      if (tick == PERIOD[$clog2(PERIOD)-1:0] - 1'b1) begin
        tick    <= '0;
        seen_a  <= 1'b0;
        seen_b  <= 1'b0;
        seen_rd <= 1'b0;
        unique case (dir)
          SLOWER: begin
            if (!adapt_v && f_code != '0) begin f_code <= f_code - 1'b1; step <= 2'b10; end
            if ( adapt_v && v_code != '1) begin v_code <= v_code + 1'b1; step <= 2'b10; end
          end
          FASTER: begin
            if (!adapt_v && f_code != '1) begin f_code <= f_code + 1'b1; step <= 2'b01; end
            if ( adapt_v && v_code != '0) begin v_code <= v_code - 1'b1; step <= 2'b01; end
          end
          default: ;
        endcase
      end else begin
        tick    <= tick + 1'b1;
        seen_a  <= seen_a  | tmda | erte;
        seen_b  <= seen_b  | tmdb;
        seen_rd <= seen_rd | rd_evt;
      end
    end
  end
endmodule
