// Mixed-mode scan test wrapper around the state elements of a circuit under
// test.
//
// Every flip-flop of the circuit is a universal scan cell. The first
// NUM_CHAINS*CHAIN_LEN cells form the p-serial part (scan chains fed by the
// scan inputs, compacted by a MISR); the remaining ROWS*COLS cells form the
// p-random part, a progressive random-access-scan grid read through sense
// amplifiers into a second MISR and written one cell at a time through the
// column driver. One cell type serves both parts, and no scan multiplexer sits
// in the functional D path of either. The combinational logic of the circuit
// stays outside: it reads func_q and returns the next state on func_d
// (bits [NS-1:0] serial cells, bits [NS +: NR] random-access cells).
//
// The two mode pins select functional (00), mixed (01), p-random (10) or
// p-serial (11) operation ({test_mode0, test_mode1}). Tests run as tester
// commands (see mms_pkg::cmd_e) over a ready/valid handshake; in mixed mode
// one ROW command reads a RAS row and shifts every chain by one bit, so the
// two parts are loaded and unloaded concurrently. With bist_en the scan
// inputs come from a weighted pseudorandom generator whose weighted test
// enables can deactivate a chain for a shift cycle. The two signature
// registers are chained (random-access MISR into serial MISR) and unloaded
// MSB first on sig_out by SIG commands: the first 16 bits out are the serial
// signature, the next 16 the random-access one. Both signatures are also
// visible in parallel on sig_serial and sig_random.
//
// The part split, mode encoding and cell roles follow the published
// architecture; sizes, command set, cycle timing and the generator are this
// design's choices.
module mms_top
  import mms_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 3,
  parameter int unsigned CHAIN_LEN  = 8,
  parameter int unsigned ROWS       = 8,
  parameter int unsigned COLS       = 8,
  localparam int unsigned NS = NUM_CHAINS * CHAIN_LEN,
  localparam int unsigned NR = ROWS * COLS,
  localparam int unsigned AW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  test_mode0,
  input  logic                  test_mode1,
  // circuit under test
  input  logic [NS+NR-1:0]      func_d,
  output logic [NS+NR-1:0]      func_q,
  // tester commands
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic [3:0]            cmd_op,
  input  logic [AW-1:0]         cmd_col_addr,
  input  logic                  cmd_wbit,
  input  logic [NUM_CHAINS-1:0] cmd_si,
  output logic                  cmd_err,
  // built-in pattern generation
  input  logic                  bist_en,
  input  logic [1:0]            si_w,
  input  logic [1:0]            te_w,
  // test outputs
  output logic [NUM_CHAINS-1:0] so,
  output logic                  sig_out,
  output logic [COLS-1:0]       sense_data,
  output logic                  sense_err,
  output logic [ROWS-1:0]       row_sel,
  output logic                  row_last,
  output logic [MISR_W-1:0]     sig_serial,
  output logic [MISR_W-1:0]     sig_random
);

  test_mode_e mode_e;
  logic [NUM_CHAINS-1:0] gen_si, gen_te, ser_cap_en, ser_te, ser_si;
  logic gen_step, ser_misr_en;
  logic ras_cap_en, ras_start, ras_advance, ras_read, ras_compact, ras_wr, ras_wbit;
  logic [AW-1:0] ras_col_addr;
  logic misr_clear, misr_shift, ras_misr_sout;

  mms_test_ctrl #(.NUM_CHAINS(NUM_CHAINS), .COLS(COLS)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .test_mode0   (test_mode0),
    .test_mode1   (test_mode1),
    .bist_en      (bist_en),
    .cmd_valid    (cmd_valid),
    .cmd_ready    (cmd_ready),
    .cmd_op       (cmd_e'(cmd_op)),
    .cmd_col_addr (cmd_col_addr),
    .cmd_wbit     (cmd_wbit),
    .cmd_si       (cmd_si),
    .cmd_err      (cmd_err),
    .mode         (mode_e),
    .gen_si       (gen_si),
    .gen_te       (gen_te),
    .gen_step     (gen_step),
    .ser_cap_en   (ser_cap_en),
    .ser_te       (ser_te),
    .ser_si       (ser_si),
    .ser_misr_en  (ser_misr_en),
    .ras_cap_en   (ras_cap_en),
    .ras_start    (ras_start),
    .ras_advance  (ras_advance),
    .ras_read     (ras_read),
    .ras_compact  (ras_compact),
    .ras_wr       (ras_wr),
    .ras_col_addr (ras_col_addr),
    .ras_wbit     (ras_wbit),
    .misr_clear   (misr_clear),
    .misr_shift   (misr_shift)
  );

  mms_wprpg #(.NUM_CHAINS(NUM_CHAINS)) u_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (gen_step),
    .si_w  (si_w),
    .te_w  (te_w),
    .si    (gen_si),
    .te    (gen_te),
    .state ()
  );

  mms_serial_part #(.NUM_CHAINS(NUM_CHAINS), .CHAIN_LEN(CHAIN_LEN)) u_serial (
    .clk        (clk),
    .rst_n      (rst_n),
    .d          (func_d[NS-1:0]),
    .q          (func_q[NS-1:0]),
    .cap_en     (ser_cap_en),
    .te         (ser_te),
    .si         (ser_si),
    .so         (so),
    .misr_clear (misr_clear),
    .misr_en    (ser_misr_en),
    .misr_shift (misr_shift),
    .misr_sin   (ras_misr_sout),
    .misr_sout  (sig_out),
    .sig        (sig_serial)
  );

  mms_pras #(.ROWS(ROWS), .COLS(COLS)) u_random (
    .clk        (clk),
    .rst_n      (rst_n),
    .d          (func_d[NS +: NR]),
    .q          (func_q[NS +: NR]),
    .cap_en     (ras_cap_en),
    .start      (ras_start),
    .advance    (ras_advance),
    .read       (ras_read),
    .compact    (ras_compact),
    .wr         (ras_wr),
    .col_addr   (ras_col_addr),
    .wbit       (ras_wbit),
    .misr_clear (misr_clear),
    .misr_shift (misr_shift),
    .misr_sin   (1'b0),
    .misr_sout  (ras_misr_sout),
    .sig        (sig_random),
    .row_sel    (row_sel),
    .row_last   (row_last),
    .sense_data (sense_data),
    .sense_err  (sense_err)
  );

endmodule
