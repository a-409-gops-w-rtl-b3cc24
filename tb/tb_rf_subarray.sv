// tb_rf_subarray: full-size sub-array (128 x 32) at a 1000 ps clock. Fills the
// array with random words, then runs random reads (back-to-back in A, B and
// E; one at a time in C and D) in five
// operating conditions (extra bitline delay slow_ps and precharge delay
// setting) and checks data and compacted flags against a reference copy:
//   A nominal          : data correct, no flags
//   B margin < MDW1+2  : data correct, TMDb set, TMDa and TED clear
//   C margin < MDW2    : TMDa seen; whenever TED is clear the data is correct
//   D late (TED)       : TED set, flop data wrong, latched data correct
//   E short precharge  : same slowness, reads are lost without any flag
// Flags belong to the read two edges earlier, data to the read one edge
// earlier. A watchdog ends a hung run.
module tb_rf_subarray;
  timeunit 1ps;
  timeprecision 1ps;
  import rf_pkg::*;

  localparam int unsigned T = 1000;
  logic clk = 1'b0, rst_n = 1'b0, wwl_en = 1'b0, rd_en = 1'b0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, dout, dout_lat;
  rf_tune_t tune;
  logic [31:0] slow_ps = '0;
  logic err_ted;
  logic [1:0] err_tmd;
  logic [31:0] model [128];
  int checks = 0, failures = 0;
  int n_tmda = 0, n_tmdb = 0, n_ted = 0, n_lost = 0, n_good_c = 0;

  rf_subarray dut (.*);

  always #(T/2) clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // Back-to-back reads; phase decides what is expected.
  task automatic run(int unsigned n, string phase);
    logic [31:0] d1, d2;     // data of reads issued 1 and 2 edges ago
    logic        v1, v2;
    v1 = 1'b0; v2 = 1'b0; d1 = '0; d2 = '0;
    for (int i = 0; i < n + 2; i++) begin
      automatic logic [6:0] a = 7'($urandom);
      @(negedge clk);
      rd_en = (i < n);
      raddr = a;
      @(posedge clk) #1;
      // dout: read issued one edge ago; flags: read issued two edges ago
      if (v2) begin
        case (phase)
          "A": check(err_tmd == 2'b00 && !err_ted, "A flags");
          "B": if (d2 != 0) check(err_tmd == 2'b10 && !err_ted, "B flags");
          "E": check(!err_ted, "E no flag");
          default: ;
        endcase
      end
      if (v1) begin
        case (phase)
          "A", "B": check(dout == d1, "data");
          "E": begin check(dout != d1 || d1 == 0, "E data lost"); if (dout != d1) n_lost++; end
          default: ;
        endcase
      end
      v2 = v1; d2 = d1;
      v1 = (i < n); d1 = model[a];
    end
    rd_en = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  // Late reads, one at a time: the flop misses the data, the 3H latch
  // holds it, and the TED flag follows one edge later.
  task automatic run_late(int unsigned n);
    for (int i = 0; i < n; i++) begin
      automatic logic [6:0] a = 7'($urandom);
      @(negedge clk);
      rd_en = 1'b1; raddr = a;
      @(negedge clk);
      rd_en = 1'b0;
      @(posedge clk) #1;
      if (model[a] != 0) check(dout != model[a], "D flop data late");
      @(negedge clk) #1;
      check(dout_lat == model[a], "D latched data correct");
      @(posedge clk) #1;
      if (model[a] != 0) begin
        check(err_ted, "D ted");
        if (err_ted) n_ted++;
      end
    end
    repeat (3) @(posedge clk);
  endtask

  // One read at a time: data after one edge, flags after the next.
  task automatic run_sparse(int unsigned n);
    for (int i = 0; i < n; i++) begin
      automatic logic [6:0]  a = 7'($urandom);
      automatic logic [31:0] got;
      @(negedge clk);
      rd_en = 1'b1; raddr = a;
      @(negedge clk);
      rd_en = 1'b0;
      @(posedge clk) #1 got = dout;
      @(posedge clk) #1;
      if (err_tmd[0]) n_tmda++;
      if (err_tmd[1]) n_tmdb++;
      if (!err_ted) begin
        check(got == model[a], "C data without TED");
        n_good_c++;
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    tune = '{mdw2_sel: 2'd1, mdw12_sel: 2'd3, pch_sel: 2'd3, clkb_sel: 2'd1};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 128; r++) begin
      @(negedge clk);
      wwl_en = 1'b1; waddr = 7'(r); wdata = $urandom; model[r] = wdata;
    end
    @(negedge clk) wwl_en = 1'b0;
    repeat (3) @(posedge clk);
    slow_ps = 0;   run(200, "A");
    slow_ps = 250; run(200, "B");
    slow_ps = 320; run_sparse(100);
    check(n_tmda > 50 && n_good_c > 20, "C: TMDa seen and clean reads correct");
    slow_ps = 390; run_late(100);
    check(n_ted > 50, "D: TED errors seen");
    tune.pch_sel = 2'd2;
    slow_ps = 390; run(100, "E");
    check(n_lost > 50, "E: reads lost silently");
    $display("tmda=%0d tmdb=%0d ted=%0d lost=%0d", n_tmda, n_tmdb, n_ted, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
