// Shared types and constants of the mixed-mode scan design.
//
// The two mode pins select one of four operating modes. The code is formed as
// {test_mode0, test_mode1}: 00 functional, 01 mixed (serial and random-access
// parts loaded and unloaded together), 10 random-access part only, 11 serial
// part only. The tester drives the test logic with one command per accepted
// ready/valid handshake; the command set is this design's own choice, the mode
// encoding follows the published architecture.
package mms_pkg;

  typedef enum logic [1:0] {
    MODE_FUNC   = 2'b00,
    MODE_MIXED  = 2'b01,
    MODE_RANDOM = 2'b10,
    MODE_SERIAL = 2'b11
  } test_mode_e;

  // Tester commands.
  //   START   : select RAS row 0
  //   ROW     : read the selected RAS row into the sense amplifiers, then
  //             compact it into the p-random MISR; in mixed mode every scan
  //             chain shifts by one bit in the same step (2 cycles)
  //   WRITE   : write one bit into column col_addr of the selected row
  //   NEXT    : advance the row shift register to the next row
  //   SHIFT   : shift the scan chains by one bit (serial or mixed mode)
  //   CAPTURE : one functional capture clock into every cell
  //   SIG     : shift the chained signature registers by one bit to sig_out
  //   CLEAR   : zero both signature registers
  typedef enum logic [3:0] {
    CMD_NOP     = 4'd0,
    CMD_START   = 4'd1,
    CMD_ROW     = 4'd2,
    CMD_WRITE   = 4'd3,
    CMD_NEXT    = 4'd4,
    CMD_SHIFT   = 4'd5,
    CMD_CAPTURE = 4'd6,
    CMD_SIG     = 4'd7,
    CMD_CLEAR   = 4'd8
  } cmd_e;

  // Signature register width and feedback polynomial (x^16 + x^12 + x^5 + 1).
  localparam int unsigned        MISR_W    = 16;
  localparam logic [MISR_W-1:0]  MISR_POLY = 16'h1021;

endpackage
