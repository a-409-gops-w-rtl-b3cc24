// tb_error_response_controller: self-checking test of the read issue,
// retirement and replay controller.
//
// Random requests are offered on the valid/ready port while the timing error
// flag is raised at random for the read in the retiring stage. A scoreboard
// checks that every accepted read retires exactly once and in the order it
// was accepted, that no new request is accepted during a replay, that a
// replayed read is issued only into an empty pipeline, and that f_half or
// v_boost follows replay_mode while replaying. Both replay modes are run.
// A watchdog ends the run if it hangs.
module tb_error_response_controller;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned AW = 11;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          replay_mode = 1'b0;
  logic          req_valid = 1'b0;
  logic [AW-1:0] req_addr = '0;
  logic          req_ready, iss_valid, ret_valid, err_evt, replay_active;
  logic          f_half, v_boost;
  logic [AW-1:0] iss_addr, ret_addr;
  logic          err = 1'b0;

  int unsigned checks = 0, failures = 0, n_err = 0, n_ret = 0;
  logic [AW-1:0] sb [$];

  error_response_controller #(.AW(AW)) dut (.*);

  always #500 clk = ~clk;

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

  // Scoreboard and protocol checks, sampled just before each rising edge.
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (req_valid && req_ready) begin
          check(!replay_active, "no new request during replay");
          sb.push_back(req_addr);
        end
        if (ret_valid) begin
          check(sb.size() != 0 && sb[0] == ret_addr, "retire order");
          if (sb.size() != 0) void'(sb.pop_front());
          n_ret++;
        end
        if (err_evt) n_err++;
        if (replay_active && iss_valid)
          check(!dut.pipe[0].v && !dut.pipe[1].v && !dut.pipe[2].v,
                "replay issues into an empty pipeline");
        check(f_half == (replay_active && !replay_mode) &&
              v_boost == (replay_active && replay_mode), "replay knob");
      end
    end
  end

  task automatic run(int unsigned cycles, int unsigned err_pct);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      req_valid = ($urandom % 4) != 0;
      req_addr  = AW'($urandom);
      err       = ($urandom % 100) < err_pct;
    end
    @(negedge clk) req_valid = 1'b0; err = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    replay_mode = 1'b0; run(2000, 10);
    replay_mode = 1'b1; run(2000, 10);
    replay_mode = 1'b0; run(500, 0);
    check(sb.size() == 0, "all accepted reads retired");
    check(n_err > 100, "errors seen and replayed");
    check(n_ret > 1000, "reads retired");
    $display("retired=%0d errors=%0d", n_ret, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
