// Self-checking testbench for mms_serial_part: shifts random bits through
// every chain, holds and captures individual chains, and checks the state
// vector, the scan outputs and the MISR signature against a reference model.
module tb_mms_serial_part;
  import mms_pkg::*;
  localparam int NC = 3, L = 5, N = NC * L;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d, q, ref_q;
  logic [NC-1:0] cap_en, te, si, so, ref_so;
  logic misr_clear, misr_en, misr_shift, misr_sin, misr_sout;
  logic [MISR_W-1:0] sig, ref_sig;
  int checks = 0, failures = 0, n_shift = 0, n_cap = 0;

  mms_serial_part #(.NUM_CHAINS(NC), .CHAIN_LEN(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [MISR_W-1:0] mstep(input logic [MISR_W-1:0] s, input logic [NC-1:0] x);
    return {s[MISR_W-2:0], 1'b0} ^ (s[MISR_W-1] ? MISR_POLY : '0) ^ MISR_W'(x);
  endfunction

  initial begin
    {cap_en, te, si, misr_clear, misr_en, misr_shift, misr_sin} = '0;
    d = '0;
    ref_q = '0; ref_sig = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d  = N'({$urandom, $urandom});
      si = NC'($urandom);
      for (int c = 0; c < NC; c++) begin
        cap_en[c] = ($urandom_range(0, 5) == 0);
        te[c]     = ($urandom_range(0, 2) != 0);
      end
      misr_en = |te;
      for (int c = 0; c < NC; c++) ref_so[c] = ref_q[c*L + L-1];
      #1 check(so, ref_so, "so");
      check(q, ref_q, "q");
      if (misr_en) ref_sig = mstep(ref_sig, ref_so);
      for (int c = 0; c < NC; c++) begin
        if (cap_en[c]) begin
          for (int k = 0; k < L; k++) ref_q[c*L+k] = d[c*L+k];
          n_cap++;
        end else if (te[c]) begin
          for (int k = L-1; k > 0; k--) ref_q[c*L+k] = ref_q[c*L+k-1];
          ref_q[c*L] = si[c];
          n_shift++;
        end
      end
      @(posedge clk); #1;
      check(q, ref_q, "q after edge");
      check(sig, ref_sig, "signature");
    end
    // A bit entering chain 1 leaves it after exactly L shifts.
    @(negedge clk); cap_en = '0; misr_en = 1'b0; te = 3'b010; si = 3'b010;
    @(posedge clk); @(negedge clk); si = '0;
    repeat (L - 1) @(posedge clk);
    #1 check(so[1], 1'b1, "latency of L shifts");
    $display("shifts=%0d captures=%0d", n_shift, n_cap);
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
