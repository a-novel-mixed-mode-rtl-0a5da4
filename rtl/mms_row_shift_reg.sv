// Row address shift register of the progressive random-access-scan part.
//
// Holds the row select one-hot. start selects row 0; advance moves the select
// to the next row, wrapping from the last row to row 0, so the rows are
// visited in order as in progressive random access scan. last is high while
// the last row is selected. After reset no row is selected. Both actions take
// effect at the rising clk edge; start wins over advance. The ring-register
// form is this design's choice.
module mms_row_shift_reg #(
  parameter int unsigned ROWS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            advance,
  output logic [ROWS-1:0] row_sel,
  output logic            last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       row_sel <= '0;
    else if (start)   row_sel <= ROWS'(1);
    else if (advance) row_sel <= {row_sel[ROWS-2:0], row_sel[ROWS-1]};
  end

  assign last = row_sel[ROWS-1];

endmodule
