// tb_vf_adaptation_controller: self-checking test of the V/F adaptation
// controller.
//
// Each PERIOD-cycle window gets one random scenario: idle, reads only,
// reads with TMDb, reads with TMDa, or an ERTe pulse. A reference model
// predicts the decision at the end of the window (TMDa or ERTe: slow down;
// TMDb only: hold; clean reads: speed up; no reads: hold), the step pulse
// and the saturating frequency or voltage code, for both adapt_v settings.
// Short PERIOD and narrow codes make saturation happen. Watchdog included.
module tb_vf_adaptation_controller;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned PERIOD = 16;
  localparam int unsigned CODE_W = 3;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              adapt_v = 1'b0, rd_evt = 1'b0, tmda = 1'b0, tmdb = 1'b0, erte = 1'b0;
  logic [CODE_W-1:0] f_code, v_code;
  logic [1:0]        step;

  int unsigned checks = 0, failures = 0, n_up = 0, n_down = 0, n_hold = 0;

  vf_adaptation_controller #(.PERIOD(PERIOD), .CODE_W(CODE_W),
                             .F_INIT(3'd4), .V_INIT(3'd4)) dut (.*);

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
    int f_ref, v_ref;
    f_ref = 4; v_ref = 4;
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 400; w++) begin
      automatic int unsigned scen = $urandom % 5;
      automatic logic sa = 0, sb = 0, sr = 0;
      automatic int dir;           // +1 faster, -1 slower, 0 hold
      adapt_v = (w / 50) % 2 == 1;
      for (int c = 0; c < PERIOD; c++) begin
        rd_evt = (scen != 0) && ($urandom % 2);
        tmdb   = (scen == 2) && ($urandom % 8 == 0) && c < PERIOD - 1;
        tmda   = (scen == 3) && ($urandom % 8 == 0) && c < PERIOD - 1;
        erte   = (scen == 4) && c == PERIOD / 2;
        sa |= tmda | erte; sb |= tmdb; sr |= rd_evt;
        @(posedge clk) #1;
        if (c != PERIOD - 1) check(step == 2'b00, "no step inside window");
        @(negedge clk);
      end
      dir = sa ? -1 : sb ? 0 : sr ? 1 : 0;
      if (!adapt_v) begin
        if (dir == 1 && f_ref < 7) begin f_ref++; check(step == 2'b01, "step up"); n_up++; end
        else if (dir == -1 && f_ref > 0) begin f_ref--; check(step == 2'b10, "step down"); n_down++; end
        else begin check(step == 2'b00, "hold"); n_hold++; end
      end else begin
        if (dir == 1 && v_ref > 0) begin v_ref--; check(step == 2'b01, "step up"); n_up++; end
        else if (dir == -1 && v_ref < 7) begin v_ref++; check(step == 2'b10, "step down"); n_down++; end
        else begin check(step == 2'b00, "hold"); n_hold++; end
      end
      check(int'(f_code) == f_ref && int'(v_code) == v_ref, "codes");
    end
    @(negedge clk) rd_evt = 0; tmda = 0; tmdb = 0; erte = 0;
    check(n_up > 20 && n_down > 20 && n_hold > 20, "all decisions seen");
    $display("up=%0d down=%0d hold=%0d", n_up, n_down, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
