// tb_rwl_decoder: issues random reads (and idle cycles) and checks that the
// registered row's wordline, and only it, is high during the high phase after
// the issuing edge and that all wordlines are low in the low phase and when
// no read was issued.
module tb_rwl_decoder;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, rd_en = 1'b0;
  logic [6:0] raddr = '0;
  logic [127:0] rwl;
  int checks = 0, failures = 0;

  rwl_decoder dut (.*);

  always #500 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic logic en = ($urandom_range(3) != 0);
      automatic logic [6:0] a = 7'($urandom);
      @(negedge clk);
      rd_en = en; raddr = a;
      @(posedge clk) #100;
      checks++;
      if (rwl !== (en ? (128'(1) << a) : '0)) begin
        failures++; $display("high phase: rwl %h for en %b addr %0d", rwl, en, a);
      end
      @(negedge clk) #100;
      checks++;
      if (rwl !== '0) begin failures++; $display("low phase: rwl %h", rwl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
