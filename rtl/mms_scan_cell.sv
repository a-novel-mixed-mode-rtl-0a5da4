// Universal scan cell: one state element of the circuit under test that works
// both as a serial scan cell and as a random-access-scan (RAS) cell.
//
// The cell keeps the functional path free of a scan multiplexer: functional
// capture (cap_en), serial shift (te) and RAS write (row_en with a driven bit
// line pair) are separate load paths into the same storage bit. In the
// transistor-level cell the test enable itself acts as a slow shift clock while
// the functional clock is held; at register-transfer level on a single clock
// that is a one-cycle te pulse. A RAS write takes place when row_en is high and
// the column driver drives bl != blb (bl = blb = 1 is the precharged idle
// state); the new value is bl. The stored bit is always visible on q, and on
// the read lines rd_bl / rd_blb (q and ~q) while row_en is high, for wired-OR
// bit lines shared by a column.
//
// Timing: every load takes effect at the next rising clk edge. If several are
// requested together the priority is capture, then shift, then write (this
// design's choice). Reset (asynchronous, active low) clears the bit; the
// published cell has no reset, it is added for a defined start state.
module mms_scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic d,       // functional data
  input  logic cap_en,  // functional capture
  input  logic si,      // scan in
  input  logic te,      // test enable pulse: shift si in
  input  logic row_en,  // RAS word line
  input  logic bl,      // bit line from the column driver
  input  logic blb,     // bit-bar line from the column driver
  output logic q,
  output logic rd_bl,
  output logic rd_blb
);

  logic wr;
  assign wr = row_en && (bl != blb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (cap_en) q <= d;
    else if (te)     q <= si;
    else if (wr)     q <= bl;
  end

  assign rd_bl  = row_en &  q;
  assign rd_blb = row_en & ~q;

endmodule
