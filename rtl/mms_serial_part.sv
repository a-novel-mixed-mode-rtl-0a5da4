// p-serial part: NUM_CHAINS scan chains of CHAIN_LEN universal scan cells and a
// MISR on the chain outputs.
//
// Cell k of chain c holds state bit c*CHAIN_LEN + k of the d/q vectors. Cell 0
// of a chain takes si[c], cell k takes the q of cell k-1, and so[c] is the q of
// the last cell. Each chain has its own shift pulse te[c] and capture enable
// cap_en[c], so a chain can be held or switched to capture while the others
// shift (used by the weighted test-enable BIST). On misr_en the MISR compacts
// the current so bits; the controller asserts it with each shift pulse, so the
// bit leaving a chain is compacted in the same clock edge that shifts it out.
// The MISR is unloaded serially through misr_sin/misr_sout.
// The number of chains follows the three scan inputs SI0..SI2 of the published
// architecture; the chain length is this design's choice.
module mms_serial_part
  import mms_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 3,
  parameter int unsigned CHAIN_LEN  = 8,
  localparam int unsigned N = NUM_CHAINS * CHAIN_LEN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          d,
  output logic [N-1:0]          q,
  input  logic [NUM_CHAINS-1:0] cap_en,
  input  logic [NUM_CHAINS-1:0] te,
  input  logic [NUM_CHAINS-1:0] si,
  output logic [NUM_CHAINS-1:0] so,
  input  logic                  misr_clear,
  input  logic                  misr_en,
  input  logic                  misr_shift,
  input  logic                  misr_sin,
  output logic                  misr_sout,
  output logic [MISR_W-1:0]     sig
);

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    for (genvar k = 0; k < CHAIN_LEN; k++) begin : g_cell
      logic sin_k;
      if (k == 0) begin : g_head
        assign sin_k = si[c];
      end else begin : g_body
        assign sin_k = q[c*CHAIN_LEN + k - 1];
      end
      // Serial cells never see a word line: row_en low, lines precharged.
      mms_scan_cell u_cell (
        .clk    (clk),
        .rst_n  (rst_n),
        .d      (d[c*CHAIN_LEN + k]),
        .cap_en (cap_en[c]),
        .si     (sin_k),
        .te     (te[c]),
        .row_en (1'b0),
        .bl     (1'b1),
        .blb    (1'b1),
        .q      (q[c*CHAIN_LEN + k]),
        .rd_bl  (),
        .rd_blb ()
      );
    end
    assign so[c] = q[c*CHAIN_LEN + CHAIN_LEN - 1];
  end

  mms_misr #(.WIDTH(MISR_W), .IN_W(NUM_CHAINS), .POLY(MISR_POLY)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (misr_en),
    .din   (so),
    .shift (misr_shift),
    .sin   (misr_sin),
    .sout  (misr_sout),
    .sig   (sig)
  );

endmodule
