// tb_tmd: forms the two margin windows in the testbench (SDLOUT delayed by
// 60 ps and 140 ps), moves a rising read-data edge to random times before the
// capture edge and checks that window j flags exactly when the margin is
// smaller than window j. A falling edge (read 0 after read 1) is also tried.
module tb_tmd;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 1000, W0 = 60, W1 = 140;
  logic clk = 1'b0, rst_n = 1'b0, sdlout = 1'b0;
  logic [1:0] del_sdlout = '0, tmd_out;
  int checks = 0, failures = 0;

  tmd dut (.*);

  always #(T/2) clk = ~clk;
  task automatic drive(logic v);
    sdlout = v;
    fork
      begin #(W0) del_sdlout[0] = v; end
      begin #(W1) del_sdlout[1] = v; end
    join_none
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      automatic int unsigned margin = $urandom_range(5, 300);
      automatic logic        val    = (n % 4 != 3);
      @(posedge clk);
      drive(~val);
      #(T - margin) drive(val);
      @(posedge clk) #1;
      checks++;
      if (tmd_out !== {margin < W1, margin < W0}) begin
        failures++;
        $display("margin %0d: tmd_out %b", margin, tmd_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
