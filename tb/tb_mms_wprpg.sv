// Self-checking testbench for mms_wprpg: the LFSR sequence against a
// reference of x^32 + x^22 + x^2 + x + 1, the weight logic of every weight
// setting, and the measured frequency of ones for each weight.
module tb_mms_wprpg;
  localparam int NC = 3, W = 32, STEPS = 4000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step;
  logic [1:0] si_w, te_w;
  logic [NC-1:0] si, te;
  logic [W-1:0] state, ref_state;
  int checks = 0, failures = 0;
  int ones_si [4], ones_te [4];

  mms_wprpg #(.NUM_CHAINS(NC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    step = 1'b0; si_w = '0; te_w = '0;
    ref_state = 32'h1;
    foreach (ones_si[i]) begin ones_si[i] = 0; ones_te[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check(state, ref_state, "seed");
    for (int i = 0; i < STEPS; i++) begin
      @(negedge clk);
      step = ($urandom_range(0, 4) != 0);
      for (int w = 0; w < 4; w++) begin
        si_w = 2'(w); te_w = 2'(w); #1;
        for (int c = 0; c < NC; c++) begin
          logic a, b, e, f, g, h, esi, ete;
          a = ref_state[6*c]; b = ref_state[6*c+1]; e = ref_state[6*c+2];
          f = ref_state[6*c+3]; g = ref_state[6*c+4]; h = ref_state[6*c+5];
          esi = (w == 0) ? (a & b & e) : (w == 1) ? (a & b) : (w == 2) ? a : (a | b);
          ete = (w == 0) ? 1'b1 : (w == 1) ? (f | g | h) : (w == 2) ? (f | g) : f;
          check(si[c], esi, "si weight");
          check(te[c], ete, "te weight");
          ones_si[w] += int'(si[c]);
          ones_te[w] += int'(te[c]);
        end
      end
      if (step)
        ref_state = {ref_state[W-2:0], ref_state[31] ^ ref_state[21] ^ ref_state[1] ^ ref_state[0]};
      @(posedge clk); #1;
      check(state, ref_state, "lfsr");
    end
    // Measured probability of a one within 0.04 of the nominal weight.
    begin
      real exp_si [4] = '{0.125, 0.25, 0.5, 0.75};
      real exp_te [4] = '{1.0, 0.875, 0.75, 0.5};
      for (int w = 0; w < 4; w++) begin
        real psi, pte;
        psi = real'(ones_si[w]) / real'(STEPS * NC);
        pte = real'(ones_te[w]) / real'(STEPS * NC);
        $display("weight %0d: P(si)=%0.3f P(te)=%0.3f", w, psi, pte);
        checks += 2;
        if (psi < exp_si[w] - 0.04 || psi > exp_si[w] + 0.04) failures++;
        if (pte < exp_te[w] - 0.04 || pte > exp_te[w] + 0.04) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
