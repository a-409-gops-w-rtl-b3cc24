// tb_cond_precharge: runs the clock with a delayed inverted clock made in the
// testbench and checks, at points across the low phase, that the LBL
// precharge is on only from the delayed clock until the rising edge, and that
// EQ1 follows the plain inverted clock when NAOUT was 1 at the falling edge
// (nominal bit) and the delayed precharge otherwise (weak 1 or read 0). NAOUT
// changing during the low phase must not change the choice.
module tb_cond_precharge;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 1000, D = 200;
  logic clk = 1'b0, rst_n = 1'b0, naout = 1'b0, del_pchb = 1'b0;
  logic lbl_pch, eq_en;
  int checks = 0, failures = 0;

  cond_precharge dut (.*);

  always #(T/2) clk = ~clk;
  initial forever begin
    @(negedge clk);
    fork begin #(D) del_pchb = 1'b1; end join_none
    @(posedge clk);
    fork begin #(D) del_pchb = 1'b0; end join_none
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect2(logic p, logic e, string where);
    checks++;
    if (lbl_pch !== p || eq_en !== e) begin
      failures++;
      $display("%s: pch %b eq %b, expected %b %b", where, lbl_pch, eq_en, p, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      automatic logic nom = 1'($urandom);
      @(posedge clk);
      #100 naout = nom;                         // evaluated in the high phase
      #100 expect2(1'b0, 1'b0, "high phase");
      @(negedge clk);
      #50  naout = ~nom;                        // late change, must be ignored
      expect2(1'b0, nom, "early low phase");
      #(D)  expect2(1'b1, 1'b1, "late low phase");
      #(T/2 - D - 100) expect2(1'b1, 1'b1, "end of low phase");
      @(posedge clk) #10 expect2(1'b0, 1'b0, "after rising edge");
      naout = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
