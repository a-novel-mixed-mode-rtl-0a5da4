// Self-checking testbench for mms_scan_cell: random functional, shift and
// RAS write/read requests against a reference model of the load priority
// (capture, shift, write) and of the row-gated read lines.
module tb_mms_scan_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d, cap_en, si, te, row_en, bl, blb, q, rd_bl, rd_blb;
  logic exp_q;
  int checks = 0, failures = 0;
  int n_cap = 0, n_shift = 0, n_wr = 0;

  mms_scan_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    {d, cap_en, si, te, row_en, bl, blb} = '0;
    exp_q = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(q, 1'b0, "reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d      = $urandom_range(0, 1);
      si     = $urandom_range(0, 1);
      cap_en = ($urandom_range(0, 3) == 0);
      te     = ($urandom_range(0, 2) == 0);
      row_en = $urandom_range(0, 1);
      bl     = $urandom_range(0, 1);
      blb    = ($urandom_range(0, 2) == 0) ? bl : ~bl;
      #1;
      check(rd_bl,  row_en &  exp_q, "rd_bl");
      check(rd_blb, row_en & ~exp_q, "rd_blb");
      if (cap_en)                     begin exp_q = d;  n_cap++;   end
      else if (te)                    begin exp_q = si; n_shift++; end
      else if (row_en && bl != blb)   begin exp_q = bl; n_wr++;    end
      @(posedge clk); #1;
      check(q, exp_q, "q");
    end
    if (n_cap == 0 || n_shift == 0 || n_wr == 0) failures++;
    $display("captures=%0d shifts=%0d writes=%0d", n_cap, n_shift, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
