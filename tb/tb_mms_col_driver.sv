// Self-checking testbench for mms_col_driver: random selects, write strobe
// and data; selected columns get (wbit, ~wbit) while writing, every other
// column stays precharged at (1, 1).
module tb_mms_col_driver;
  localparam int COLS = 8;
  logic [COLS-1:0] col_sel, bl, blb;
  logic wr, wbit;
  int checks = 0, failures = 0;

  mms_col_driver #(.COLS(COLS)) dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      col_sel = COLS'($urandom);
      wr = $urandom_range(0, 1);
      wbit = $urandom_range(0, 1);
      #1;
      for (int c = 0; c < COLS; c++) begin
        logic eb, ebb;
        eb  = (wr && col_sel[c]) ? wbit  : 1'b1;
        ebb = (wr && col_sel[c]) ? ~wbit : 1'b1;
        checks++;
        if (bl[c] !== eb || blb[c] !== ebb) begin
          failures++;
          $display("FAIL col %0d: got %b%b exp %b%b", c, bl[c], blb[c], eb, ebb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
