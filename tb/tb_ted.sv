// tb_ted: moves the read-data edge across the cycle: before the capture edge
// (no error, flop has the data), inside the following high phase (error,
// latch has the correct data, flop the old) and after the falling edge (no
// error reported for that cycle). Checks ted_out, dout and dout_lat during the
// low phase, when the error is consumed.
module tb_ted;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 1000;
  logic clk = 1'b0, rst_n = 1'b0, sdlout = 1'b0;
  logic dout, dout_lat, ted_out;
  int checks = 0, failures = 0;

  ted dut (.*);

  always #(T/2) clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic int   at  = $urandom_range(T/2 + 10, 2*T - 10);   // from launch edge
      automatic logic val = 1'($urandom);
      automatic logic exp_err = (at > T) && (at < T + T/2);
      @(posedge clk);
      sdlout = ~val;
      #(at) sdlout = val;
      if (at < T + T/2) @(negedge clk);
      #5;
      checks++;
      if (ted_out !== exp_err ||
          dout_lat !== ((at < T + T/2) ? val : ~val) ||
          dout !== ((at < T) ? val : ~val)) begin
        failures++;
        $display("arrival %0d: err %b dout %b lat %b", at, ted_out, dout, dout_lat);
      end
      if (at >= T + T/2) #(T);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
