// p-random part, built as a progressive random access scan (PRAS): row
// address shift register, column address decoder, column driver, RAS cell
// array, sense amplifiers and a MISR.
//
// Operation on the selected row (row_sel from the row shift register):
//   read    : the row's word line is raised and the sense amplifiers sample
//             the row at the clock edge (sense_data valid the next cycle)
//   compact : the MISR compacts sense_data (issue one cycle after read)
//   wr      : the word line is raised and the column driver writes wbit into
//             column col_addr of the selected row at the clock edge
// start selects row 0 and advance moves to the next row. Word lines are
// raised only during read or wr. cap_en loads functional data into every
// cell. The MISR signature is unloaded serially via misr_sin / misr_sout.
// Reading before writing a row, one write per changed cell and progressive
// row order follow the published PRAS scheme; the one-cycle command timing is
// this design's choice.
module mms_pras
  import mms_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8,
  localparam int unsigned N  = ROWS * COLS,
  localparam int unsigned AW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      d,
  output logic [N-1:0]      q,
  input  logic              cap_en,
  input  logic              start,
  input  logic              advance,
  input  logic              read,
  input  logic              compact,
  input  logic              wr,
  input  logic [AW-1:0]     col_addr,
  input  logic              wbit,
  input  logic              misr_clear,
  input  logic              misr_shift,
  input  logic              misr_sin,
  output logic              misr_sout,
  output logic [MISR_W-1:0] sig,
  output logic [ROWS-1:0]   row_sel,
  output logic              row_last,
  output logic [COLS-1:0]   sense_data,
  output logic              sense_err
);

  logic [ROWS-1:0] row_en;
  logic [COLS-1:0] col_sel, bl, blb, rd_bl, rd_blb;

  mms_row_shift_reg #(.ROWS(ROWS)) u_row (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .advance (advance),
    .row_sel (row_sel),
    .last    (row_last)
  );

  assign row_en = (read || wr) ? row_sel : '0;

  mms_col_decoder #(.COLS(COLS)) u_coldec (
    .addr (col_addr),
    .en   (wr),
    .sel  (col_sel)
  );

  mms_col_driver #(.COLS(COLS)) u_coldrv (
    .col_sel (col_sel),
    .wr      (wr),
    .wbit    (wbit),
    .bl      (bl),
    .blb     (blb)
  );

  mms_ras_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (d),
    .q      (q),
    .cap_en (cap_en),
    .row_en (row_en),
    .bl     (bl),
    .blb    (blb),
    .rd_bl  (rd_bl),
    .rd_blb (rd_blb)
  );

  mms_sense_amp #(.COLS(COLS)) u_sa (
    .clk    (clk),
    .rst_n  (rst_n),
    .sense  (read),
    .rd_bl  (rd_bl),
    .rd_blb (rd_blb),
    .data   (sense_data),
    .err    (sense_err)
  );

  mms_misr #(.WIDTH(MISR_W), .IN_W(COLS), .POLY(MISR_POLY)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (compact),
    .din   (sense_data),
    .shift (misr_shift),
    .sin   (misr_sin),
    .sout  (misr_sout),
    .sig   (sig)
  );

  // A read and a write of the same row in one cycle would fight on the lines.
  assert property (@(posedge clk) disable iff (!rst_n) !(read && wr))
    else $error("mms_pras: read and write in the same cycle");

endmodule
