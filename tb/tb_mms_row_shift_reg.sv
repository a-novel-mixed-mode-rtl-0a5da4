// Self-checking testbench for mms_row_shift_reg: nothing selected after
// reset, start selects row 0, advance walks the rows in order and wraps, and
// start wins over advance.
module tb_mms_row_shift_reg;
  localparam int ROWS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, advance, last;
  logic [ROWS-1:0] row_sel;
  int checks = 0, failures = 0;

  mms_row_shift_reg #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [ROWS-1:0] got, input logic [ROWS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    start = 1'b0; advance = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check(row_sel, '0, "after reset");
    @(negedge clk); start = 1'b1; @(posedge clk); #1; start = 1'b0;
    check(row_sel, 8'b0000_0001, "start");
    for (int i = 1; i <= 2 * ROWS; i++) begin
      @(negedge clk); advance = 1'b1; @(posedge clk); #1;
      check(row_sel, ROWS'(1) << (i % ROWS), "advance");
      check(ROWS'(last), ROWS'(i % ROWS == ROWS - 1), "last");
      @(negedge clk); advance = 1'b0; @(posedge clk); #1;
      check(row_sel, ROWS'(1) << (i % ROWS), "hold");
    end
    @(negedge clk); advance = 1'b1; start = 1'b1; @(posedge clk); #1;
    check(row_sel, 8'b0000_0001, "start over advance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
