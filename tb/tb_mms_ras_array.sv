// Self-checking testbench for mms_ras_array: random single-row writes through
// the bit lines, single-row reads through the read lines, and functional
// capture, against a reference copy of the grid.
module tb_mms_ras_array;
  localparam int R = 4, C = 5, N = R * C;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d, q, ref_q;
  logic cap_en;
  logic [R-1:0] row_en;
  logic [C-1:0] bl, blb, rd_bl, rd_blb;
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;

  mms_ras_array #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    d = '0; cap_en = 1'b0; row_en = '0; bl = '1; blb = '1;
    ref_q = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int r, op;
      @(negedge clk);
      r = $urandom_range(0, R - 1);
      op = $urandom_range(0, 9);
      d = N'($urandom);
      cap_en = (op == 0);
      row_en = '0; bl = '1; blb = '1;
      if (op >= 1 && op <= 5) begin          // write some columns of row r
        row_en[r] = 1'b1;
        for (int c = 0; c < C; c++)
          if ($urandom_range(0, 1)) begin
            bl[c] = $urandom_range(0, 1); blb[c] = ~bl[c];
          end
        n_wr++;
      end else if (op >= 6) begin            // read row r
        row_en[r] = 1'b1;
        #1 check(rd_bl, ref_q[r*C +: C], "read bl");
        check(rd_blb, C'(~ref_q[r*C +: C]), "read blb");
        n_rd++;
      end
      if (cap_en) ref_q = d;
      else if (op >= 1 && op <= 5)
        for (int c = 0; c < C; c++) if (bl[c] != blb[c]) ref_q[r*C + c] = bl[c];
      @(posedge clk); #1;
      check(q, ref_q, "state");
    end
    // No row enabled: read lines idle low.
    @(negedge clk); row_en = '0; #1;
    check({rd_bl, rd_blb}, '0, "idle lines");
    $display("writes=%0d reads=%0d", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
