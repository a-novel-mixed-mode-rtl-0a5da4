// Test controller of the mixed-mode scan design.
//
// Decodes the two mode pins ({test_mode0, test_mode1}: 00 functional, 01
// mixed, 10 p-random, 11 p-serial) and turns tester commands (mms_pkg::cmd_e,
// ready/valid handshake) into the enables of the serial part, the random
// access part, the pattern generator and the signature registers.
//
//   functional : every cell captures on every clock; commands are ignored
//   mixed      : ROW reads a RAS row and shifts all chains one bit in the
//                same step, so both parts load and unload concurrently
//   p-random   : ROW only reads the RAS row; SHIFT is refused
//   p-serial   : SHIFT shifts the chains; RAS commands are refused
// CAPTURE, SIG and CLEAR are accepted in every test mode. A refused command is
// consumed and flagged on cmd_err for one cycle.
//
// Shift source: cmd_si, or with bist_en the weighted generator, whose test
// enables may deactivate a chain for a cycle (that chain captures instead).
//
// Timing: every command takes one cycle, ROW two (read, then compact); the
// controller drops cmd_ready during the second ROW cycle. Enables are
// combinational from the accepted command and act at the next clock edge.
// The mode encoding follows the published design; the command set, handshake
// and timing are this design's own.
module mms_test_ctrl
  import mms_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 3,
  parameter int unsigned COLS       = 8,
  localparam int unsigned AW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  test_mode0,
  input  logic                  test_mode1,
  input  logic                  bist_en,
  // tester command
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  cmd_e                  cmd_op,
  input  logic [AW-1:0]         cmd_col_addr,
  input  logic                  cmd_wbit,
  input  logic [NUM_CHAINS-1:0] cmd_si,
  output logic                  cmd_err,
  output test_mode_e            mode,
  // weighted pattern generator
  input  logic [NUM_CHAINS-1:0] gen_si,
  input  logic [NUM_CHAINS-1:0] gen_te,
  output logic                  gen_step,
  // p-serial
  output logic [NUM_CHAINS-1:0] ser_cap_en,
  output logic [NUM_CHAINS-1:0] ser_te,
  output logic [NUM_CHAINS-1:0] ser_si,
  output logic                  ser_misr_en,
  // p-random
  output logic                  ras_cap_en,
  output logic                  ras_start,
  output logic                  ras_advance,
  output logic                  ras_read,
  output logic                  ras_compact,
  output logic                  ras_wr,
  output logic [AW-1:0]         ras_col_addr,
  output logic                  ras_wbit,
  // both signature registers
  output logic                  misr_clear,
  output logic                  misr_shift
);

  typedef enum logic {S_IDLE, S_COMPACT} state_e;
  state_e state;

  logic accept, ras_ok, ser_ok, test_ok, shift;

  assign mode      = test_mode_e'({test_mode0, test_mode1});
  assign cmd_ready = (state == S_IDLE);
  assign accept    = cmd_valid && cmd_ready;
  assign ras_ok    = (mode == MODE_MIXED) || (mode == MODE_RANDOM);
  assign ser_ok    = (mode == MODE_MIXED) || (mode == MODE_SERIAL);
  assign test_ok   = (mode != MODE_FUNC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else if (state == S_COMPACT) state <= S_IDLE;
    else if (accept && cmd_op == CMD_ROW && ras_ok) state <= S_COMPACT;
  end

  always_comb begin
    logic capture;
    capture     = 1'b0;
    shift       = 1'b0;
    cmd_err     = 1'b0;
    ras_start   = 1'b0;
    ras_advance = 1'b0;
    ras_read    = 1'b0;
    ras_wr      = 1'b0;
    misr_clear  = 1'b0;
    misr_shift  = 1'b0;
    ras_compact = (state == S_COMPACT);
    if (accept) begin
      unique case (cmd_op)
        CMD_NOP:     ;
        CMD_START:   if (ras_ok)  ras_start   = 1'b1; else cmd_err = 1'b1;
        CMD_ROW:     if (ras_ok) begin
                       ras_read = 1'b1;
                       shift    = (mode == MODE_MIXED);
                     end else cmd_err = 1'b1;
        CMD_WRITE:   if (ras_ok)  ras_wr      = 1'b1; else cmd_err = 1'b1;
        CMD_NEXT:    if (ras_ok)  ras_advance = 1'b1; else cmd_err = 1'b1;
        CMD_SHIFT:   if (ser_ok)  shift       = 1'b1; else cmd_err = 1'b1;
        CMD_CAPTURE: if (test_ok) capture     = 1'b1; else cmd_err = 1'b1;
        CMD_SIG:     if (test_ok) misr_shift  = 1'b1; else cmd_err = 1'b1;
        CMD_CLEAR:   if (test_ok) misr_clear  = 1'b1; else cmd_err = 1'b1;
        default:     cmd_err = 1'b1;
      endcase
    end
    // Functional mode: every cell is an ordinary flip-flop of the circuit.
    if (!test_ok) capture = 1'b1;

    ras_cap_en  = capture;
    ser_misr_en = shift;
    gen_step    = shift && bist_en;
    for (int unsigned c = 0; c < NUM_CHAINS; c++) begin
      if (shift && bist_en) begin
        ser_te[c]     = gen_te[c];
        ser_cap_en[c] = ~gen_te[c];
      end else begin
        ser_te[c]     = shift;
        ser_cap_en[c] = capture;
      end
    end
    ser_si = bist_en ? gen_si : cmd_si;
  end

  assign ras_col_addr = cmd_col_addr;
  assign ras_wbit     = cmd_wbit;

  // Tester side of the handshake: a command held while not accepted must
  // not change.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid && !cmd_ready |=> $stable(cmd_op))
    else $error("mms_test_ctrl: command changed while waiting");

endmodule
