// Multiple-input signature register (MISR) with a serial unload path.
//
// On en the register steps as a Galois LFSR with feedback polynomial POLY and
// XORs the IN_W response bits into its low bits: sig <= (sig << 1) ^ (msb ?
// POLY : 0) ^ din. On shift it becomes a plain shift register (sin enters at
// bit 0, sout is the MSB), so several MISRs can be chained and their
// signatures unloaded through one scan output. clear zeroes the signature.
// Priority: clear, shift, en. All actions happen at the rising clk edge.
// Width and polynomial are this design's choice (x^16 + x^12 + x^5 + 1).
module mms_misr #(
  parameter int unsigned       WIDTH = 16,
  parameter int unsigned       IN_W  = 3,
  parameter logic [WIDTH-1:0]  POLY  = 16'h1021
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [IN_W-1:0]  din,
  input  logic             shift,
  input  logic             sin,
  output logic             sout,
  output logic [WIDTH-1:0] sig
);

  logic [WIDTH-1:0] din_ext;
  assign din_ext = WIDTH'(din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (shift) sig <= {sig[WIDTH-2:0], sin};
    else if (en)    sig <= {sig[WIDTH-2:0], 1'b0} ^ (sig[WIDTH-1] ? POLY : '0) ^ din_ext;
  end

  assign sout = sig[WIDTH-1];

  initial assert (IN_W <= WIDTH) else $error("mms_misr: IN_W exceeds WIDTH");

endmodule
