// resilient_rf_top: adaptive and resilient domino register file (7 KB).
//
// N_SUB sub-arrays of ENTRIES x WIDTH bits (14 x 128 x 32 = 7 KB) share one
// write port and one read port. Every read is checked in place by per-bit
// timing margin detectors (TMD) and timing error detectors (TED); each
// sub-array compacts its flags into one TED and two TMD bits. Around the
// array sit the three controllers of the scheme:
//   * error response controller: retires reads whose TED flag is clear and
//     replays failed ones at half frequency (f_half) or raised supply (v_boost);
//   * error rate tracker: raises erte when errors in a sampling period exceed
//     err_threshold;
//   * V/F adaptation controller: moves f_code (or v_code, adapt_v = 1) from the
//     TMD flags and erte.
// The clock generator (a behavioural model) sits inside the top and clocks
// everything from f_code and f_half; its clock is brought out as clk. The
// voltage regulator is outside: the top drives v_code and v_boost to it. slow_ps, the extra
// bitline evaluation delay of the present supply, temperature and aging, and
// tune, the delay-line settings, feed the behavioural read-path models.
//
// Interface and timing: a read request (req_valid/req_ready, req_addr =
// {sub-array, row}) accepted before edge k is issued at k; its data appears
// on rsp_data with rsp_valid after edge k+2 unless it had to be replayed.
// Writes (wr_en, wr_addr, wr_data) take effect at the rising edge. Addresses
// whose sub-array index is N_SUB or more are ignored.
// The precharge delay setting in tune must suit the clock period: a late read
// survives only if its bitline finishes before half a period plus that delay,
// so the useful setting shifts as the adaptation moves the clock.
// Organisation, detectors and the controller structure follow the published
// design; the request/response interface, the serialised replay and the
// per-sub-array TED/TMDa/TMDb compactors are this design's own.
module resilient_rf_top
  import rf_pkg::*;
#(
  parameter int unsigned N_SUBS     = N_SUB,
  parameter int unsigned N_ROWS     = ENTRIES,
  parameter int unsigned N_BITS     = WIDTH,
  parameter int unsigned ERT_PERIOD = 1024,
  parameter int unsigned VF_PERIOD  = 256,
  parameter int unsigned CODE_W     = 6,
  parameter int unsigned T_BASE_PS  = 1160,   // clock period at f_code = 0
  parameter int unsigned T_STEP_PS  = 10,     // period step per f_code
  localparam int unsigned SW = (N_SUBS > 1) ? $clog2(N_SUBS) : 1,
  localparam int unsigned RW = $clog2(N_ROWS),
  localparam int unsigned AW = SW + RW
) (
  output logic              clk,
  output int unsigned       period_ps,
  input  logic              rst_n,
  // read port
  input  logic              req_valid,
  input  logic [AW-1:0]     req_addr,
  output logic              req_ready,
  output logic              rsp_valid,
  output logic [AW-1:0]     rsp_addr,
  output logic [N_BITS-1:0] rsp_data,
  // write port
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [N_BITS-1:0] wr_data,
  // settings
  input  rf_tune_t          tune,
  input  logic              replay_mode,
  input  logic              adapt_v,
  input  logic [15:0]       err_threshold,
  // operating point seen by the read path models
  input  logic [31:0]       slow_ps,
  // to clock generator and voltage regulator
  output logic [CODE_W-1:0] f_code,
  output logic [CODE_W-1:0] v_code,
  output logic              f_half,
  output logic              v_boost,
  // status
  output logic              err_evt,
  output logic              erte,
  output logic              tmda_evt,
  output logic              tmdb_evt,
  output logic              replay_active,
  output logic [15:0]       err_count,      // errors in the last ERT period
  output logic [1:0]        vf_step         // [0] sped up, [1] slowed down
);
  timeunit 1ps;
  timeprecision 1ps;

  logic              iss_valid;
  logic [AW-1:0]     iss_addr;
  logic [SW-1:0]     iss_sub;
  logic [N_SUBS-1:0] sub_ted;
  logic [N_SUBS-1:0] sub_tmda;
  logic [N_SUBS-1:0] sub_tmdb;
  logic [N_BITS-1:0] sub_dout [N_SUBS];
  logic [SW-1:0]     sub_q1, sub_q2;
  logic [N_BITS-1:0] dout_q2;
  logic              err;
  logic              ret_valid;
  logic [AW-1:0]     ret_addr;

  clock_generator #(.CODE_W(CODE_W), .T_BASE_PS(T_BASE_PS), .T_STEP_PS(T_STEP_PS)) u_clk (
    .f_code, .f_half, .clk, .period_ps
  );

  assign iss_sub = iss_addr[AW-1 -: SW];

  // The 3H-latch copy of each sub-array (dout_lat) is correct even after a
  // TED error, but the published scheme replays instead of forwarding it, so
  // it is left unconnected here.
  for (genvar s = 0; s < N_SUBS; s++) begin : g_sub
    logic [N_MDW-1:0]  err_tmd;
    rf_subarray #(.N_ROWS(N_ROWS), .N_BITS(N_BITS), .SUB_ID(s)) u_sub (
      .clk, .rst_n,
      .wwl_en(wr_en && wr_addr[AW-1 -: SW] == SW'(s)),
      .waddr(wr_addr[RW-1:0]), .wdata(wr_data),
      .rd_en(iss_valid && iss_sub == SW'(s)), .raddr(iss_addr[RW-1:0]),
      .tune, .slow_ps,
      .dout(sub_dout[s]), .dout_lat(), .err_ted(sub_ted[s]), .err_tmd
    );
    assign sub_tmda[s] = err_tmd[0];
    assign sub_tmdb[s] = err_tmd[1];
  end

  // Read data and sub-array index follow the read down the pipeline: the
  // flop output of edge k+1 is copied at k+2, next to the compacted flags.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_q1  <= '0;
      sub_q2  <= '0;
      dout_q2 <= '0;
    end else begin
      sub_q1  <= iss_sub;
      sub_q2  <= sub_q1;
      dout_q2 <= (32'(sub_q2) < N_SUBS) ? sub_dout[sub_q2] : '0;
    end
  end

  assign err = |sub_ted;

  error_response_controller #(.AW(AW)) u_erc (
    .clk, .rst_n, .replay_mode,
    .req_valid, .req_addr, .req_ready,
    .iss_valid, .iss_addr,
    .err, .ret_valid, .ret_addr, .err_evt,
    .replay_active, .f_half, .v_boost
  );

  assign rsp_valid = ret_valid;
  assign rsp_addr  = ret_addr;
  assign rsp_data  = dout_q2;

  error_rate_tracker #(.PERIOD(ERT_PERIOD), .CNT_W(16)) u_ert (
    .clk, .rst_n, .err(err_evt), .threshold(err_threshold),
    .erte, .last_count(err_count)
  );

  // Margin flags count only for reads retired at the adapted frequency.
  assign tmda_evt = ret_valid && !replay_active && (|sub_tmda);
  assign tmdb_evt = ret_valid && !replay_active && (|sub_tmdb);

  vf_adaptation_controller #(.PERIOD(VF_PERIOD), .CODE_W(CODE_W)) u_vf (
    .clk, .rst_n, .adapt_v,
    .rd_evt(ret_valid && !replay_active),
    .tmda(tmda_evt), .tmdb(tmdb_evt), .erte,
    .f_code, .v_code, .step(vf_step)
  );
endmodule
