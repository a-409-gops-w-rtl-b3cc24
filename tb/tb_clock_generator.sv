// tb_clock_generator: self-checking test of the behavioural clock generator.
//
// Sweeps random frequency codes with and without the F/2 request and
// measures the time between rising edges and the high time. After a code
// change the first cycle may still use the old period, so each setting is
// measured from its second rising edge on. Watchdog included.
module tb_clock_generator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CODE_W = 6, T_BASE = 1160, T_STEP = 10;

  logic [CODE_W-1:0] f_code = '0;
  logic              f_half = 1'b0;
  logic              clk;
  int unsigned       period_ps;

  int unsigned checks = 0, failures = 0;

  clock_generator #(.CODE_W(CODE_W), .T_BASE_PS(T_BASE), .T_STEP_PS(T_STEP)) dut (.*);

  initial begin
    #50_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) begin
      automatic time t0, t1, th;
      automatic int unsigned exp_p;
      @(negedge clk);
      f_code = CODE_W'($urandom);
      f_half = $urandom % 2;
      exp_p  = (T_BASE - int'(f_code) * T_STEP) * (f_half ? 2 : 1);
      repeat (2) @(posedge clk);
      t0 = $time;
      @(negedge clk) th = $time - t0;
      @(posedge clk) t1 = $time;
      check(t1 - t0 == time'(exp_p), "period");
      check(th == time'(exp_p / 2), "high time");
      check(period_ps == exp_p, "period_ps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
