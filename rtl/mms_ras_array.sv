// Random-access-scan cell array: ROWS x COLS universal scan cells.
//
// Cell (r, c) holds state bit r*COLS + c of the d/q vectors. Each row has a
// word line row_en[r]; each column shares a write bit/bit-bar pair (bl, blb)
// from the column driver and a read pair (rd_bl, rd_blb) formed as the OR of
// the row-gated outputs of its cells (a precharged wired-OR line). With one
// row enabled, rd_bl/rd_blb of a column carry that row's bit and its
// complement. cap_en loads the functional d of every cell. The square grid
// follows the published observation that a sqrt(N) x sqrt(N) arrangement
// minimises routing; the 8 x 8 size is this design's choice.
module mms_ras_array #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8,
  localparam int unsigned N = ROWS * COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    d,
  output logic [N-1:0]    q,
  input  logic            cap_en,
  input  logic [ROWS-1:0] row_en,
  input  logic [COLS-1:0] bl,
  input  logic [COLS-1:0] blb,
  output logic [COLS-1:0] rd_bl,
  output logic [COLS-1:0] rd_blb
);

  logic [N-1:0] cell_bl, cell_blb;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mms_scan_cell u_cell (
        .clk    (clk),
        .rst_n  (rst_n),
        .d      (d[r*COLS + c]),
        .cap_en (cap_en),
        .si     (1'b0),
        .te     (1'b0),
        .row_en (row_en[r]),
        .bl     (bl[c]),
        .blb    (blb[c]),
        .q      (q[r*COLS + c]),
        .rd_bl  (cell_bl[r*COLS + c]),
        .rd_blb (cell_blb[r*COLS + c])
      );
    end
  end

  always_comb begin
    rd_bl  = '0;
    rd_blb = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      rd_bl  |= cell_bl[r*COLS +: COLS];
      rd_blb |= cell_blb[r*COLS +: COLS];
    end
  end

endmodule
