// tb_resilient_rf_top_full: full-size run of the resilient register file
// with every top-level parameter at its default (14 sub-arrays of 128 x 32,
// 1024-cycle error rate period, 256-cycle adaptation period).
//
// All 1792 entries are written with random data, then random reads to all
// sub-arrays run while the frequency adapts up from the slowest clock, and
// then under periodic supply droop, where late reads are caught by the
// timing error detectors and replayed at half frequency. A reference copy
// checks every response. Counts adaptation steps, TMD flags, TED errors and
// replays. The clock generator inside the top starts at its default
// 1160 ps period; the delayed-precharge setting pch_sel = 2 covers late reads
// over the band the adaptation moves through.
// Watchdog included.
module tb_resilient_rf_top_full;
  timeunit 1ps;
  timeprecision 1ps;
  import rf_pkg::*;

  localparam int unsigned AW = $clog2(N_SUB) + $clog2(ENTRIES);

  logic             clk, rst_n = 1'b0;
  logic             req_valid = 1'b0;
  logic [AW-1:0]    req_addr = '0;
  logic             req_ready, rsp_valid;
  logic [AW-1:0]    rsp_addr;
  logic [WIDTH-1:0] rsp_data;
  logic             wr_en = 1'b0;
  logic [AW-1:0]    wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0;
  rf_tune_t         tune;
  logic             replay_mode = 1'b0, adapt_v = 1'b0;
  logic [15:0]      err_threshold = 16'd4;
  logic [31:0]      slow_ps = '0;
  logic [5:0]       f_code, v_code;
  logic             f_half, v_boost, err_evt, erte, tmda_evt, tmdb_evt, replay_active;
  logic [15:0]      err_count;
  logic [1:0]       vf_step;
  int unsigned      period_ps;

  int          noise = 0;
  int unsigned cyc = 0;

  logic [WIDTH-1:0] model [N_SUB * ENTRIES];

  int unsigned checks = 0, failures = 0;
  int unsigned n_rsp = 0, n_ted = 0, n_tmda = 0, n_tmdb = 0, n_up = 0, n_down = 0;

  resilient_rf_top dut (.*);

  initial begin
    #600_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    forever begin
      @(posedge clk);
      cyc++;
      slow_ps = ((cyc % 300) < 100) ? 32'(noise) : 32'd0;
      if (rst_n) begin
        if (rsp_valid) begin
          n_rsp++;
          check(rsp_data == model[rsp_addr], "response data");
        end
        if (err_evt) n_ted++;
        if (tmda_evt) n_tmda++;
        if (tmdb_evt) n_tmdb++;
        if (vf_step[0]) n_up++;
        if (vf_step[1]) n_down++;
      end
    end
  end

  task automatic traffic(int unsigned cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      req_valid = ($urandom % 8) != 0;
      req_addr  = (AW'($urandom % N_SUB) << $clog2(ENTRIES)) | AW'($urandom % ENTRIES);
    end
    @(negedge clk) req_valid = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    tune = '{mdw2_sel: 2'd1, mdw12_sel: 2'd3, pch_sel: 2'd2, clkb_sel: 2'd1};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N_SUB * ENTRIES; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = $urandom; model[a] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    traffic(12000);
    $display("adapted: f_code=%0d up=%0d tmdb=%0d", f_code, n_up, n_tmdb);
    check(n_up > 20 && n_tmdb > 0, "frequency adapted up to the margin");
    noise = 170;
    traffic(8000);
    noise = 0;
    check(n_ted > 0, "TED errors under droop");
    check(n_down > 0, "frequency adapted down");
    $display("rsp=%0d ted=%0d tmda=%0d tmdb=%0d up=%0d down=%0d f_code=%0d",
             n_rsp, n_ted, n_tmda, n_tmdb, n_up, n_down, f_code);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
