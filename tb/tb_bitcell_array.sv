// tb_bitcell_array: writes random words to every row of the storage array,
// then raises one read wordline at a time and checks that exactly the local
// bitline holding that row is pulled in each bitslice that stores a 1, and
// nothing else. Also checks that no wordline means no pull, and that a later
// write overwrites a row.
module tb_bitcell_array;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned R = 128, B = 32, PL = 16, NL = R / PL;
  logic clk = 1'b0, wwl_en = 1'b0;
  logic [6:0] waddr = '0;
  logic [B-1:0] wdata = '0;
  logic [R-1:0] rwl = '0;
  logic [B-1:0][NL-1:0] lbl_pull;
  logic [B-1:0] model [R];
  int checks = 0, failures = 0;

  bitcell_array dut (.*);

  always #500 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(int unsigned r);
    logic [B-1:0][NL-1:0] exp;
    rwl = '0;
    rwl[r] = 1'b1;
    #1;
    exp = '0;
    for (int b = 0; b < B; b++) exp[b][r / PL] = model[r][b];
    checks++;
    if (lbl_pull !== exp) begin
      failures++;
      $display("row %0d: pull %h expected %h", r, lbl_pull, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      wwl_en = 1'b1; waddr = 7'(r); wdata = $urandom; model[r] = wdata;
    end
    @(negedge clk) wwl_en = 1'b0;
    rwl = '0; #1;
    checks++;
    if (lbl_pull !== '0) begin failures++; $display("pull without wordline"); end
    for (int r = 0; r < R; r++) check_row(r);
    for (int n = 0; n < 50; n++) begin
      automatic int unsigned r = $urandom_range(R-1);
      @(negedge clk);
      rwl = '0;
      wwl_en = 1'b1; waddr = 7'(r); wdata = $urandom; model[r] = wdata;
      @(negedge clk) wwl_en = 1'b0;
      check_row(r);
      check_row($urandom_range(R-1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
