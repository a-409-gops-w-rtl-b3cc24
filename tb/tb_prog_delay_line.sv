// tb_prog_delay_line: for every setting, toggles the input and measures the
// delay to each output edge, expecting T_FIXED_PS + sel * T_STEP_PS; also
// checks that a pulse shorter than the delay passes through unchanged.
module tb_prog_delay_line;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TF = 40, TS = 30;
  logic a = 1'b0, y;
  logic [1:0] sel = '0;
  int checks = 0, failures = 0;
  time ta, ty;

  prog_delay_line #(.N(1), .T_FIXED_PS(TF), .T_STEP_PS(TS)) dut (.a, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      #500;
      for (int e = 0; e < 2; e++) begin
        ta = $time;
        a = ~a;
        @(y);
        ty = $time;
        checks++;
        if (ty - ta != TF + s * TS) begin
          failures++; $display("sel %0d: delay %0t", s, ty - ta);
        end
        #500;
      end
    end
    // a 10 ps pulse passes a 130 ps delay unchanged (transport delay)
    sel = 2'd3;
    #500;
    ta = $time;
    a = 1'b1; #10 a = 1'b0;
    @(posedge y) ty = $time;
    checks++;
    if (ty - ta != TF + 3 * TS) begin failures++; $display("pulse start %0t", ty - ta); end
    @(negedge y);
    checks++;
    if ($time - ty != 10) begin failures++; $display("pulse width %0t", $time - ty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
