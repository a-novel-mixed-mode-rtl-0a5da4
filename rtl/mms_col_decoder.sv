// Column address decoder of the random-access-scan part.
//
// Turns a binary column address into a one-hot column select while en is
// high; an address at or above COLS selects nothing. Purely combinational.
module mms_col_decoder #(
  parameter int unsigned COLS = 8,
  localparam int unsigned AW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic [AW-1:0]   addr,
  input  logic            en,
  output logic [COLS-1:0] sel
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < COLS; i++)
      if (en && addr == AW'(i)) sel[i] = 1'b1;
  end

endmodule
