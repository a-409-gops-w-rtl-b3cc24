// tb_domino_read_array: drives the read-path model of two bitslices directly
// (cell pulls, precharge, EQ1 and the delayed inverted clock made in the
// testbench, 1000 ps cycle) and checks its timing mechanisms:
//   nominal read 1 arrives 620..680 ps after launch; read 0 clears SDLOUT
//   after the delayed clock; a slowed read with a long delayed precharge
//   arrives late (in the next high phase); the same read with a short delayed
//   precharge is lost (sensing failure); a long delayed precharge without EQ1
//   leaves the bitline low so the next read-0 sees a false 1.
module tb_domino_read_array;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 1000, NB = 2, NL = 8, NN = 4, DCLKB = 60;
  localparam int unsigned EVAL = 440, PATH = 80 + 50 + 50, WID = 60;
  logic clk = 1'b0, del_clkb = 1'b0;
  logic [NB-1:0][NL-1:0] lbl_pull = '0;
  logic [NB-1:0][NN-1:0] lbl_pch = '0, eq_en = '0, naout;
  logic [NB-1:0] sdlout;
  logic [31:0] slow_ps = '0;
  int checks = 0, failures = 0;
  time t_launch, t_rise;

  domino_read_array #(.N_BITS(NB), .NL(NL)) dut (.*);

  always #(T/2) clk = ~clk;
  initial forever begin
    @(negedge clk);
    fork begin #(DCLKB) del_clkb = 1'b1; end join_none
    @(posedge clk);
    fork begin #(DCLKB) del_clkb = 1'b0; end join_none
  end
  always @(posedge sdlout[0]) t_rise = $time;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // One read cycle on bitslice 0, LBL 0 (and bitslice 1 idle): pull during the
  // high phase, precharge from negedge + dpch to the next posedge. eq_mode:
  // 0 none, 1 with the precharge, 2 from the falling edge.
  task automatic cycle(logic one, int unsigned dpch, int unsigned eq_mode);
    @(posedge clk);
    t_launch = $time;
    lbl_pull[0][0] = one;
    @(negedge clk);
    lbl_pull[0][0] = 1'b0;
    if (eq_mode == 2) eq_en = '1;
    #(dpch);
    lbl_pch = '1;
    if (eq_mode == 1) eq_en = '1;
    @(posedge clk);
    lbl_pch = '0;
    eq_en   = '0;
  endtask

  initial begin
    t_rise = 0;
    repeat (2) @(posedge clk);
    // nominal read 1
    cycle(1'b1, 400, 2);
    check(sdlout[0] && t_rise - t_launch >= EVAL + PATH && t_rise - t_launch <= EVAL + PATH + WID,
          "nominal arrival");
    check(!sdlout[1], "idle bitslice stays 0");
    // read 0 clears it shortly after the next falling edge
    cycle(1'b0, 400, 2);
    check(!sdlout[0], "read 0 clears SDLOUT");
    // late read: arrives in the next high phase
    slow_ps = 390;
    t_rise = 0;
    cycle(1'b1, 400, 1);
    check(!sdlout[0], "late read not there at the capture edge");
    #(T/2 - 1);
    check(sdlout[0] && t_rise > t_launch + T && t_rise < t_launch + T + T/2,
          "late read arrives in the next high phase");
    cycle(1'b0, 400, 2);
    // sensing failure: precharge at 280 ps kills the slow evaluation
    t_rise = 0;
    cycle(1'b1, 280, 1);
    #(T/2 - 1);
    check(!sdlout[0] && t_rise == 0, "sensing failure loses the read");
    // precharge failure: long delay and no EQ1, next read 0 sees a 1
    slow_ps = 0;
    cycle(1'b0, 400, 2);
    cycle(1'b1, 400, 0);
    check(sdlout[0], "read 1 before precharge failure");
    cycle(1'b0, 400, 2);
    check(sdlout[0] && naout[0][0], "unrestored bitline reads as 1");
    // with EQ1 from the falling edge the same sequence is clean
    cycle(1'b0, 400, 2);
    cycle(1'b0, 400, 2);
    cycle(1'b1, 400, 2);
    cycle(1'b0, 400, 2);
    check(!sdlout[0] && !naout[0][0], "EQ1 charge sharing restores in time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
