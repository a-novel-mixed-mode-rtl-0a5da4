// Column driver of the random-access-scan part.
//
// While wr is high it drives the bit and bit-bar lines of the selected
// columns to wbit and ~wbit; every other column, and every column while wr is
// low, stays at the precharged level bl = blb = 1, which no cell takes as a
// write. Purely combinational. The precharge convention is this design's
// choice, after common SRAM practice.
module mms_col_driver #(
  parameter int unsigned COLS = 8
) (
  input  logic [COLS-1:0] col_sel,
  input  logic            wr,
  input  logic            wbit,
  output logic [COLS-1:0] bl,
  output logic [COLS-1:0] blb
);

  always_comb begin
    for (int unsigned i = 0; i < COLS; i++) begin
      if (wr && col_sel[i]) begin
        bl[i]  = wbit;
        blb[i] = ~wbit;
      end else begin
        bl[i]  = 1'b1;
        blb[i] = 1'b1;
      end
    end
  end

endmodule
