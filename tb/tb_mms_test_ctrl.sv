// Self-checking testbench for mms_test_ctrl: every command in every mode,
// with and without BIST, against a table of the enables each should raise;
// the two-cycle ROW timing (ready low in the compact cycle); refused
// commands flagged on cmd_err; functional mode capturing on every clock.
module tb_mms_test_ctrl;
  import mms_pkg::*;
  localparam int NC = 3, COLS = 8, AW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode0, test_mode1, bist_en, cmd_valid, cmd_ready, cmd_wbit, cmd_err;
  cmd_e cmd_op;
  logic [AW-1:0] cmd_col_addr, ras_col_addr;
  logic [NC-1:0] cmd_si, gen_si, gen_te, ser_cap_en, ser_te, ser_si;
  test_mode_e mode;
  logic gen_step, ser_misr_en, ras_cap_en, ras_start, ras_advance, ras_read;
  logic ras_compact, ras_wr, ras_wbit, misr_clear, misr_shift;
  int checks = 0, failures = 0, n_err = 0, n_row = 0;

  mms_test_ctrl #(.NUM_CHAINS(NC), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (mode %0d cmd %0d bist %0b): got %h exp %h",
               what, {test_mode0, test_mode1}, cmd_op, bist_en, got, exp);
    end
  endtask

  initial begin
    cmd_valid = 1'b0; cmd_op = CMD_NOP; cmd_col_addr = '0; cmd_wbit = 1'b0;
    cmd_si = '0; gen_si = '0; gen_te = '0; bist_en = 1'b0;
    {test_mode0, test_mode1} = 2'b00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int m = 0; m < 4; m++) begin
        for (int op = 0; op <= 8; op++) begin
          logic ras, ser, tst, e_shift, e_cap, e_err;
          logic e_start, e_adv, e_read, e_wr, e_sig, e_clr;
          @(negedge clk);
          {test_mode0, test_mode1} = 2'(m);
          bist_en = rep[0];
          cmd_valid = 1'b1;
          cmd_op = cmd_e'(op);
          cmd_col_addr = AW'($urandom); cmd_wbit = $urandom_range(0, 1);
          cmd_si = NC'($urandom); gen_si = NC'($urandom); gen_te = NC'($urandom);
          #1;
          ras = (m == 1 || m == 2); ser = (m == 1 || m == 3); tst = (m != 0);
          e_start = (op == 1) && ras;
          e_read  = (op == 2) && ras;
          e_wr    = (op == 3) && ras;
          e_adv   = (op == 4) && ras;
          e_shift = ((op == 5) && ser) || ((op == 2) && m == 1);
          e_cap   = ((op == 6) && tst) || !tst;
          e_sig   = (op == 7) && tst;
          e_clr   = (op == 8) && tst;
          e_err   = (op != 0) && !(e_start || e_read || e_wr || e_adv || e_shift ||
                                   (op == 6 && tst) || e_sig || e_clr);
          check(mode, m, "mode");
          check(cmd_ready, 1'b1, "ready");
          check({ras_start, ras_read, ras_wr, ras_advance, misr_shift, misr_clear},
                {e_start, e_read, e_wr, e_adv, e_sig, e_clr}, "ras/misr enables");
          check(cmd_err, e_err, "cmd_err");
          check(ser_misr_en, e_shift, "serial misr");
          check(ras_cap_en, e_cap, "ras capture");
          check(ser_si, bist_en ? gen_si : cmd_si, "si source");
          check(gen_step, e_shift && bist_en, "generator step");
          if (e_shift && bist_en) begin
            check(ser_te, gen_te, "weighted te");
            check(ser_cap_en, NC'(~gen_te), "deactivated chains capture");
          end else begin
            check(ser_te, {NC{e_shift}}, "te");
            check(ser_cap_en, {NC{e_cap}}, "serial capture");
          end
          check({ras_col_addr, ras_wbit}, {cmd_col_addr, cmd_wbit}, "write data");
          if (e_err) n_err++;
          @(posedge clk); #1;
          cmd_valid = 1'b0;
          if (e_read) begin
            n_row++;
            // Second ROW cycle: compact, not ready, nothing else.
            check(cmd_ready, 1'b0, "ready low in compact cycle");
            check(ras_compact, 1'b1, "compact");
            check({ras_read, ser_misr_en, ras_wr}, 3'b000, "idle in compact cycle");
            @(posedge clk); #1;
          end
          check(ras_compact, 1'b0, "no compact");
          check(cmd_ready, 1'b1, "ready again");
        end
      end
    end
    // No command: nothing happens in a test mode.
    @(negedge clk); cmd_valid = 1'b0; {test_mode0, test_mode1} = 2'b01; #1;
    check({ras_read, ras_wr, ser_te, ser_cap_en, ras_cap_en, cmd_err}, '0, "idle");
    if (n_err == 0 || n_row == 0) failures++;
    $display("refused=%0d rows=%0d", n_err, n_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
