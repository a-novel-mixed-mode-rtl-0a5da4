// Self-checking testbench for mms_col_decoder: every address with and
// without enable, including addresses past the last column.
module tb_mms_col_decoder;
  localparam int COLS = 6, AW = 3;
  logic [AW-1:0] addr;
  logic en;
  logic [COLS-1:0] sel, exp;
  int checks = 0, failures = 0;

  mms_col_decoder #(.COLS(COLS)) dut (.*);

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < (1 << AW); a++) begin
        addr = AW'(a); en = e[0];
        exp = '0;
        if (e == 1 && a < COLS) exp[a] = 1'b1;
        #1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL addr %0d en %0d: got %b exp %b", a, e, sel, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
