// Self-checking testbench for mms_pras: loads a random pattern row by row
// (start, read, compact, writes of the cells that change, advance), checks
// the sensed rows, the cell states and the MISR signature against a
// reference, then captures functional data and reads it back.
module tb_mms_pras;
  import mms_pkg::*;
  localparam int R = 4, C = 4, N = R * C, AW = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d, q, ref_q;
  logic cap_en, start, advance, read, compact, wr, wbit;
  logic [AW-1:0] col_addr;
  logic misr_clear, misr_shift, misr_sin, misr_sout, row_last, sense_err;
  logic [MISR_W-1:0] sig, ref_sig;
  logic [R-1:0] row_sel;
  logic [C-1:0] sense_data;
  int checks = 0, failures = 0, n_wr = 0;

  mms_pras #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [MISR_W-1:0] mstep(input logic [MISR_W-1:0] s, input logic [C-1:0] x);
    return {s[MISR_W-2:0], 1'b0} ^ (s[MISR_W-1] ? MISR_POLY : '0) ^ MISR_W'(x);
  endfunction

  task automatic idle();
    {cap_en, start, advance, read, compact, wr, wbit, misr_clear, misr_shift, misr_sin} = '0;
    col_addr = '0;
  endtask

  task automatic pulse_start();
    @(negedge clk); idle(); start = 1'b1; @(posedge clk); #1; start = 1'b0;
  endtask

  // Read row r, compact it, write the pattern's differing cells, advance.
  task automatic load_row(input int r, input logic [C-1:0] pat);
    @(negedge clk); idle(); read = 1'b1;
    @(posedge clk); #1;
    check(sense_data, ref_q[r*C +: C], "sensed row");
    check(sense_err, 1'b0, "sense error");
    @(negedge clk); idle(); compact = 1'b1;
    ref_sig = mstep(ref_sig, ref_q[r*C +: C]);
    @(posedge clk); #1;
    check(sig, ref_sig, "signature");
    for (int c = 0; c < C; c++) begin
      if (pat[c] != ref_q[r*C + c]) begin
        @(negedge clk); idle(); wr = 1'b1; col_addr = AW'(c); wbit = pat[c];
        ref_q[r*C + c] = pat[c];
        n_wr++;
        @(posedge clk); #1;
      end
    end
    check(q, ref_q, "state after row writes");
    @(negedge clk); idle(); advance = 1'b1;
    @(posedge clk); #1;
    check(row_sel, R'(1) << ((r + 1) % R), "row advance");
  endtask

  initial begin
    idle(); d = '0;
    ref_q = '0; ref_sig = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 6; p++) begin
      logic [N-1:0] pat;
      pat = N'($urandom);
      pulse_start();
      check(row_sel, R'(1), "start row 0");
      for (int r = 0; r < R; r++) begin
        check(row_last, r == R - 1, "row_last");
        load_row(r, pat[r*C +: C]);
      end
      check(q, pat, "pattern loaded");
      // Functional capture of the response.
      @(negedge clk); idle(); d = N'($urandom); cap_en = 1'b1;
      ref_q = d;
      @(posedge clk); #1;
      check(q, ref_q, "capture");
    end
    // Unload the signature MSB first.
    for (int i = 0; i < MISR_W; i++) begin
      check(misr_sout, ref_sig[MISR_W-1-i], "unload");
      @(negedge clk); idle(); misr_shift = 1'b1; @(posedge clk); #1;
    end
    check(sig, '0, "after unload");
    $display("writes=%0d", n_wr);
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
