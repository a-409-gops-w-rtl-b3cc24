// tb_error_rate_tracker: self-checking test of the error rate tracker.
//
// Random error pulses are applied at several densities. A reference model
// counts the errors of each PERIOD-cycle window and predicts the one-cycle
// ERTe pulse (count above threshold) and the reported count. Uses a short
// PERIOD so that many windows are covered. A watchdog ends a hung run.
module tb_error_rate_tracker;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned PERIOD = 64;
  localparam int unsigned CNT_W  = 16;

  logic             clk = 1'b0, rst_n = 1'b0, err = 1'b0;
  logic [CNT_W-1:0] threshold = 16'd8;
  logic             erte;
  logic [CNT_W-1:0] last_count;

  int unsigned checks = 0, failures = 0, n_erte = 0, n_quiet = 0;

  error_rate_tracker #(.PERIOD(PERIOD), .CNT_W(CNT_W)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    #100_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      automatic int unsigned pct = $urandom % 30;
      automatic int unsigned cnt = 0;
      threshold = CNT_W'($urandom % 16);
      for (int c = 0; c < PERIOD; c++) begin
        err = ($urandom % 100) < pct;
        cnt += int'(err);
        @(posedge clk) #1;
        if (c != PERIOD - 1) check(!erte, "no ERTe inside window");
        err = 1'b0;
        @(negedge clk);
        err = 1'b0;
      end
      // The last posedge of the window has just updated the outputs.
      check(last_count == CNT_W'(cnt), "window count");
      check(erte == (cnt > int'(threshold)), "ERTe decision");
      if (erte) n_erte++; else n_quiet++;
    end
    check(n_erte > 20 && n_quiet > 20, "both outcomes seen");
    $display("erte=%0d quiet=%0d", n_erte, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
