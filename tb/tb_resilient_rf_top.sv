// tb_resilient_rf_top: end-to-end test of the adaptive and resilient
// register file with its clock generator and a model of the operating point.
//
// The clock comes from the top's clock generator (f_code, f_half), set here
// to a 1000 ps base period in 5 ps steps. A small environment model turns the supply code and operating
// conditions into the extra bitline delay the read path sees:
//   slow_ps = base + droop - K_V * v_code - (v_boost ? BOOST : 0)  (>= 0)
// so raising the supply code or boosting the supply speeds reads up, and a
// droop slows them down. A reference copy of the memory checks every
// response. The run goes through phases that make each mechanism happen
// and counts it:
//   1 frequency adaptation up from the slowest clock until the margin flags
//     (TMDb, TMDa) appear, and down again when TMDa fires;
//   2 periodic supply droop (as from a noise injector): late reads raise TED errors, which are replayed at F/2, and
//     the error rate tracker raises ERTe (low threshold);
//   3 the same droop with replay at raised supply (v_boost);
//   4 supply adaptation (adapt_v): v_code moves up and down (the TMDb
//     window is narrowed to the TMDa one here, so no hold band);
//   5 a slow corner with the delayed precharge at its longest setting (late
//     reads are caught by TED and replayed, no wrong data) and then at a
//     shorter setting (the bitlines are precharged before the late data
//     reaches the latch: wrong data without any error flag).
// Every response outside phase 5b must carry the right data. Two sub-arrays
// and short controller periods keep the run short. Watchdog included.
module tb_resilient_rf_top;
  timeunit 1ps;
  timeprecision 1ps;
  import rf_pkg::*;

  localparam int unsigned N_SUBS = 2, N_ROWS = 128, N_BITS = 32;
  localparam int unsigned CODE_W = 6;
  localparam int unsigned AW = $clog2(N_SUBS) + $clog2(N_ROWS);
  localparam int K_V = 10, BOOST = 300;

  logic              clk, rst_n = 1'b0;
  logic              req_valid = 1'b0;
  logic [AW-1:0]     req_addr = '0;
  logic              req_ready, rsp_valid;
  logic [AW-1:0]     rsp_addr;
  logic [N_BITS-1:0] rsp_data;
  logic              wr_en = 1'b0;
  logic [AW-1:0]     wr_addr = '0;
  logic [N_BITS-1:0] wr_data = '0;
  rf_tune_t          tune;
  logic              replay_mode = 1'b0, adapt_v = 1'b0;
  logic [15:0]       err_threshold = 16'd2;
  logic [31:0]       slow_ps = '0;
  logic [CODE_W-1:0] f_code, v_code;
  logic              f_half, v_boost, err_evt, erte, tmda_evt, tmdb_evt, replay_active;
  logic [15:0]       err_count;
  logic [1:0]        vf_step;
  int unsigned       period_ps;

  int base = 0, droop = 0;
  int noise = 0;               // periodic droop amplitude (noise injector)
  int unsigned cyc = 0;
  logic silent_ok = 1'b0;      // phase 5b: wrong data allowed (and counted)

  logic [N_BITS-1:0] model [N_SUBS * N_ROWS];

  int unsigned checks = 0, failures = 0;
  int unsigned n_rsp = 0, n_ted = 0, n_rep_fhalf = 0, n_rep_vboost = 0;
  int unsigned n_tmda = 0, n_tmdb = 0, n_erte = 0;
  int unsigned n_f_up = 0, n_f_down = 0, n_v_up = 0, n_v_down = 0;
  int unsigned n_silent = 0, n_silent_longpch = 0;
  int unsigned max_f = 0;

  resilient_rf_top #(.N_SUBS(N_SUBS), .N_ROWS(N_ROWS), .N_BITS(N_BITS),
                     .ERT_PERIOD(64), .VF_PERIOD(32), .CODE_W(CODE_W),
                     .T_BASE_PS(1000), .T_STEP_PS(5)) dut (.*);

  initial begin
    #200_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // Environment: operating point updated at every rising edge.
  initial begin
    forever begin
      @(posedge clk);
      cyc++;
      begin
        automatic int s = base + droop + ((cyc % 300) < 100 ? noise : 0) - K_V * int'(v_code) - (v_boost ? BOOST : 0);
        slow_ps = (s < 0) ? 32'd0 : 32'(s);
      end
    end
  end

  // Monitor: data check and event counting.
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (rsp_valid) begin
          n_rsp++;
          if (silent_ok) begin
            if (rsp_data != model[rsp_addr]) n_silent++;
          end else begin
            check(rsp_data == model[rsp_addr], "response data");
            if (rsp_data != model[rsp_addr]) n_silent_longpch++;
          end
        end
        if (err_evt) begin
          n_ted++;
          if (!replay_mode) n_rep_fhalf++; else n_rep_vboost++;
        end
        if (replay_active) check(f_half == !replay_mode && v_boost == replay_mode,
                                 "replay knob follows replay_mode");
        if (tmda_evt) n_tmda++;
        if (tmdb_evt) n_tmdb++;
        if (erte) n_erte++;
        if (vf_step[0]) begin if (adapt_v) n_v_down++; else n_f_up++; end
        if (vf_step[1]) begin if (adapt_v) n_v_up++;   else n_f_down++; end
        if (int'(f_code) > max_f) max_f = int'(f_code);
      end
    end
  end

  // Random read traffic for a number of cycles, then drain.
  task automatic traffic(int unsigned cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      req_valid = ($urandom % 8) != 0;
      req_addr  = {AW'($urandom % N_SUBS) << $clog2(N_ROWS)} | AW'($urandom % N_ROWS);
    end
    @(negedge clk) req_valid = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    tune = '{mdw2_sel: 2'd1, mdw12_sel: 2'd3, pch_sel: 2'd2, clkb_sel: 2'd1};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N_SUBS * N_ROWS; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = $urandom; model[a] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;

    // 1: frequency adaptation at the nominal point
    traffic(3000);
    $display("phase1 f_code=%0d max=%0d up=%0d down=%0d tmda=%0d tmdb=%0d ted=%0d",
             f_code, max_f, n_f_up, n_f_down, n_tmda, n_tmdb, n_ted);
    // 2: periodic droop, replay at F/2
    noise = 170;
    traffic(3000);
    $display("phase2 f_code=%0d ted=%0d fhalf=%0d erte=%0d", f_code, n_ted, n_rep_fhalf, n_erte);
    noise = 0; traffic(1500);
    // 3: periodic droop, replay at raised supply
    replay_mode = 1'b1; noise = 170;
    traffic(3000);
    $display("phase3 f_code=%0d ted=%0d vboost=%0d erte=%0d", f_code, n_ted, n_rep_vboost, n_erte);
    noise = 0; replay_mode = 1'b0;
    // 4: supply adaptation at a fixed clock
    adapt_v = 1'b1; base = 170; tune.mdw12_sel = 2'd1;
    traffic(4000);
    $display("phase4 v_code=%0d v_up=%0d v_down=%0d", v_code, n_v_up, n_v_down);
    adapt_v = 1'b0; base = 0; tune.mdw12_sel = 2'd3;
    // 5a: slow corner with the longest delayed precharge: errors caught
    base = K_V * int'(v_code); noise = 170; traffic(3000);
    // 5b: shorter delayed precharge: late data lost without a flag
    silent_ok = 1'b1; tune.pch_sel = 2'd1;
    traffic(3000);
    silent_ok = 1'b0; tune.pch_sel = 2'd2; noise = 0;
    $display("phase5 silent(pch_sel=2)=%0d silent(pch_sel=1)=%0d", n_silent_longpch, n_silent);

    check(n_f_up > 5 && n_f_down > 0, "frequency adapted up and down");
    check(n_v_up > 0 && n_v_down > 0, "supply adapted up and down");
    check(n_tmda > 0 && n_tmdb > 0, "TMDa and TMDb seen");
    check(n_rep_fhalf > 0 && n_rep_vboost > 0, "TED errors replayed at F/2 and at raised V");
    check(n_erte > 0, "ERTe raised");
    check(n_silent > 0 && n_silent_longpch == 0, "sensing failure only without enough precharge delay");
    $display("rsp=%0d ted=%0d fhalf=%0d vboost=%0d tmda=%0d tmdb=%0d erte=%0d f_up=%0d f_down=%0d v_up=%0d v_down=%0d silent=%0d",
             n_rsp, n_ted, n_rep_fhalf, n_rep_vboost, n_tmda, n_tmdb, n_erte,
             n_f_up, n_f_down, n_v_up, n_v_down, n_silent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
