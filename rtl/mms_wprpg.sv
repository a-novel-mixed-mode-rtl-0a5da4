// Weighted pseudorandom pattern generator for the scan chains (logic BIST).
//
// A LFSR_W-bit Fibonacci LFSR (x^32 + x^22 + x^2 + x + 1 at the default
// width) advances on step. For each chain c six state bits, starting at bit
// 6c (modulo LFSR_W), are combined into
//   si[c] : a weighted scan-in bit, P(1) = 1/8, 1/4, 1/2, 3/4 for si_w = 0..3
//           (AND of three, AND of two, one, OR of two bits)
//   te[c] : a weighted test enable, P(1) = 1, 7/8, 3/4, 1/2 for te_w = 0..3
// A chain whose test enable is 0 in a shift cycle is deactivated: it captures
// functional data instead of shifting, which biases the loaded pattern towards
// the circuit's own responses. The weighting by deactivating the scan chain
// follows the published method; the LFSR, bit selection and weight sets are
// this design's choice. Outputs are combinational from the LFSR state; step
// takes effect at the rising clk edge, reset loads SEED.
module mms_wprpg #(
  parameter int unsigned        NUM_CHAINS = 3,
  parameter int unsigned        LFSR_W     = 32,
  parameter logic [LFSR_W-1:0]  TAPS       = 32'h8020_0003,
  parameter logic [LFSR_W-1:0]  SEED       = 32'h0000_0001
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic [1:0]            si_w,
  input  logic [1:0]            te_w,
  output logic [NUM_CHAINS-1:0] si,
  output logic [NUM_CHAINS-1:0] te,
  output logic [LFSR_W-1:0]     state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= {state[LFSR_W-2:0], ^(state & TAPS)};
  end

  always_comb begin
    for (int unsigned c = 0; c < NUM_CHAINS; c++) begin
      logic a, b, e, f, g, h;
      a = state[(6*c + 0) % LFSR_W];
      b = state[(6*c + 1) % LFSR_W];
      e = state[(6*c + 2) % LFSR_W];
      f = state[(6*c + 3) % LFSR_W];
      g = state[(6*c + 4) % LFSR_W];
      h = state[(6*c + 5) % LFSR_W];
      unique case (si_w)
        2'd0: si[c] = a & b & e;
        2'd1: si[c] = a & b;
        2'd2: si[c] = a;
        default: si[c] = a | b;
      endcase
      unique case (te_w)
        2'd0: te[c] = 1'b1;
        2'd1: te[c] = f | g | h;
        2'd2: te[c] = f | g;
        default: te[c] = f;
      endcase
    end
  end

  initial assert (SEED != '0) else $error("mms_wprpg: SEED must be non-zero");

endmodule
