// Self-checking testbench for mms_misr: compaction against a bit-level
// reference of the Galois step, clear, and serial unload of the signature.
module tb_mms_misr;
  localparam int W = 16, IW = 3;
  localparam logic [W-1:0] POLY = 16'h1021;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en, shift, sin, sout;
  logic [IW-1:0] din;
  logic [W-1:0] sig, ref_sig;
  int checks = 0, failures = 0;

  mms_misr #(.WIDTH(W), .IN_W(IW), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Bit-serial reference: bit i gets bit i-1, plus feedback where POLY has a 1.
  function automatic logic [W-1:0] step(input logic [W-1:0] s, input logic [IW-1:0] x);
    logic [W-1:0] n;
    for (int i = 0; i < W; i++) begin
      n[i] = (i == 0 ? 1'b0 : s[i-1]) ^ (POLY[i] & s[W-1]) ^ (i < IW ? x[i] : 1'b0);
    end
    return n;
  endfunction

  initial begin
    {clear, en, shift, sin, din} = '0;
    ref_sig = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = IW'($urandom);
      clear = (i == 150);
      if (clear) ref_sig = '0;
      else if (en) ref_sig = step(ref_sig, din);
      @(posedge clk); #1;
      check(sig, ref_sig, "compact");
    end
    // Known value: compacting 3'b001 once from zero gives 1.
    @(negedge clk); clear = 1'b1; en = 1'b0; @(posedge clk); #1;
    @(negedge clk); clear = 1'b0; en = 1'b1; din = 3'b001; @(posedge clk); #1;
    check(sig, 16'h0001, "single step");
    // 16 steps of zero input from 1: x^16 mod P = POLY.
    din = '0;
    repeat (16) @(posedge clk);
    #1 check(sig, POLY, "x^16 mod P");
    // Unload: shift out 16 bits, MSB first, shifting in ones.
    @(negedge clk); en = 1'b0;
    ref_sig = sig;
    for (int i = 0; i < W; i++) begin
      checks++;
      if (sout !== ref_sig[W-1-i]) begin failures++; $display("FAIL unload bit %0d", i); end
      @(negedge clk); shift = 1'b1; sin = 1'b1; @(posedge clk); #1;
    end
    check(sig, '1, "after unload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
