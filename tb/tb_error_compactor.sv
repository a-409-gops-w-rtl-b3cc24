// tb_error_compactor: applies random TED and TMD flag vectors (mostly zero,
// sometimes a single bit or several) after the rising edge, as the detectors
// do, with a random mode, and checks that the flop output after the next
// rising edge is the OR of the selected vector.
module tb_error_compactor;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, mode = 1'b0, err_compact_ff;
  logic [31:0] ted_out = '0, tmd_out = '0;
  int checks = 0, failures = 0, ones = 0;

  error_compactor dut (.*);

  always #500 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_flags();
    case ($urandom_range(3))
      0: return '0;
      1: return 32'(1) << $urandom_range(31);
      2: return $urandom & $urandom & $urandom;
      default: return '0;
    endcase
  endfunction

  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk) #50;
      mode = 1'($urandom); ted_out = rnd_flags(); tmd_out = rnd_flags();
      exp = mode ? |tmd_out : |ted_out;
      @(posedge clk) #1;
      checks++;
      if (err_compact_ff !== exp) begin
        failures++;
        $display("mode %b ted %h tmd %h: got %b", mode, ted_out, tmd_out, err_compact_ff);
      end
      if (exp) ones++;
    end
    checks++;
    if (ones < 50) begin failures++; $display("too few error cases"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
