// End-to-end testbench for mms_top at its default size (3 chains of 8 cells,
// an 8 x 8 random-access grid, 88 state bits).
//
// A small next-state function stands in for the combinational logic of the
// circuit under test (func_d = cut_next(func_q)). A reference model of the
// whole wrapper (cell states, row pointer, sense register, both signature
// registers, generator LFSR) is advanced command by command and compared
// with the design after every command. The run goes through: functional
// operation; mixed-mode patterns (each ROW reads a RAS row and shifts every
// chain together), RAS writes and captures; p-serial and p-random modes with
// commands each mode refuses; weighted BIST shifts with deactivated chains;
// and a final serial unload of both signatures on sig_out. Each mechanism is
// counted and must occur at least once.
module tb_mms_top;
  import mms_pkg::*;
  localparam int NC = 3, L = 8, R = 8, C = 8;
  localparam int NS = NC * L, NR = R * C, N = NS + NR, AW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode0, test_mode1, cmd_valid, cmd_ready, cmd_wbit, cmd_err, bist_en;
  logic sig_out, sense_err, row_last;
  logic [N-1:0] func_d, func_q;
  logic [3:0] cmd_op;
  logic [AW-1:0] cmd_col_addr;
  logic [NC-1:0] cmd_si, so;
  logic [1:0] si_w, te_w;
  logic [MISR_W-1:0] sig_serial, sig_random;
  logic [C-1:0] sense_data;
  logic [R-1:0] row_sel;

  mms_top dut (.*);

  always #5 clk = ~clk;

  // Stand-in circuit under test.
  function automatic logic [N-1:0] cut_next(input logic [N-1:0] s);
    logic [N-1:0] n;
    for (int i = 0; i < N; i++)
      n[i] = s[(i + 1) % N] ^ (s[(i * 7 + 3) % N] & ~s[(i * 5 + 11) % N]) ^ (i % 5 == 0);
    return n;
  endfunction
  assign func_d = cut_next(func_q);

  // Reference state.
  logic [N-1:0] st;
  logic [MISR_W-1:0] sig_s, sig_r;
  logic [31:0] lfsr;
  logic [C-1:0] sense;
  int row;
  logic row_valid;
  int checks = 0, failures = 0;
  int n_func = 0, n_mixed_row = 0, n_write = 0, n_ser_shift = 0, n_ras_read = 0;
  int n_refused = 0, n_bist = 0, n_deact = 0, n_capture = 0, n_sig = 0, n_stall = 0;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [MISR_W-1:0] mstep(input logic [MISR_W-1:0] s, input logic [C-1:0] x);
    return {s[MISR_W-2:0], 1'b0} ^ (s[MISR_W-1] ? MISR_POLY : '0) ^ MISR_W'(x);
  endfunction

  // Reference of one shift of the chains (si from the tester or generator).
  task automatic ref_shift(input logic [NC-1:0] tsi);
    logic [N-1:0] nx;
    logic [NC-1:0] s_in, t_en, so_now;
    nx = cut_next(st);
    for (int c = 0; c < NC; c++) begin
      logic a, b, f, g;
      a = lfsr[6*c]; b = lfsr[6*c+1]; f = lfsr[6*c+3]; g = lfsr[6*c+4];
      so_now[c] = st[c*L + L-1];
      s_in[c] = bist_en ? ((si_w == 2) ? a : (a | b)) : tsi[c];   // weights used: 2, 3
      t_en[c] = bist_en ? ((te_w == 2) ? (f | g) : 1'b1) : 1'b1;  // weights used: 0, 2
    end
    sig_s = mstep(sig_s, C'(so_now));
    for (int c = 0; c < NC; c++) begin
      if (t_en[c]) begin
        for (int k = L-1; k > 0; k--) st[c*L+k] = st[c*L+k-1];
        st[c*L] = s_in[c];
      end else begin
        for (int k = 0; k < L; k++) st[c*L+k] = nx[c*L+k];
        n_deact++;
      end
    end
    if (bist_en) begin
      lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      n_bist++;
    end
  endtask

  // Send one command and apply its effect to the reference model.
  task automatic send(input cmd_e op, input logic [AW-1:0] col = '0,
                      input logic wb = 1'b0, input logic [NC-1:0] tsi = '0);
    logic ras, ser, tst;
    int cycles;
    logic [1:0] m;
    logic refuse;
    m = {test_mode0, test_mode1};
    ras = (m == 2'b01 || m == 2'b10);
    ser = (m == 2'b01 || m == 2'b11);
    tst = (m != 2'b00);
    refuse = (op inside {CMD_START, CMD_ROW, CMD_WRITE, CMD_NEXT}) ? !ras :
             (op == CMD_SHIFT) ? !ser : (op == CMD_NOP) ? 1'b0 : !tst;
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_col_addr = col; cmd_wbit = wb; cmd_si = tsi;
    #1 check(cmd_ready, 1'b1, "ready before command");
    check(cmd_err, refuse, "command refused");
    unique case (op)
      CMD_START:   if (ras) begin row = 0; row_valid = 1'b1; end
      CMD_ROW:     if (ras) begin
                     sense = st[NS + row*C +: C];
                     if (m == 2'b01) begin ref_shift(tsi); n_mixed_row++; end
                     else n_ras_read++;
                   end
      CMD_WRITE:   if (ras) begin st[NS + row*C + int'(col)] = wb; n_write++; end
      CMD_NEXT:    if (ras) row = (row + 1) % R;
      CMD_SHIFT:   if (ser) begin ref_shift(tsi); n_ser_shift++; end
      CMD_CAPTURE: if (tst) begin st = cut_next(st); n_capture++; end
      CMD_SIG:     if (tst) begin
                     check(sig_out, sig_s[MISR_W-1], "signature bit");
                     sig_s = {sig_s[MISR_W-2:0], sig_r[MISR_W-1]};
                     sig_r = {sig_r[MISR_W-2:0], 1'b0};
                     n_sig++;
                   end
      CMD_CLEAR:   if (tst) begin sig_s = '0; sig_r = '0; end
      default: ;
    endcase
    if (!tst) st = cut_next(st);           // functional mode: capture every clock
    if (refuse) n_refused++;
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    cycles = 1;
    if (op == CMD_ROW && ras) begin
      check(cmd_ready, 1'b0, "ROW stalls the next command");
      check(sense_data, sense, "sensed row");
      check(sense_err, 1'b0, "sense error");
      n_stall++;
      sig_r = mstep(sig_r, sense);
      @(posedge clk); #1;
      cycles++;
      check(cycles, 2, "ROW takes two cycles");
    end
    check(func_q, st, "state");
    check({sig_serial, sig_random}, {sig_s, sig_r}, "signatures");
    check(row_sel, row_valid ? R'(1) << row : '0, "row pointer");
  endtask

  task automatic set_mode(input logic [1:0] m);
    @(negedge clk); {test_mode0, test_mode1} = m;
  endtask

  // One mixed-mode pattern: load the RAS rows and the chains together.
  task automatic mixed_pattern();
    logic [NR-1:0] pat;
    pat = NR'({$urandom, $urandom, $urandom});
    send(CMD_START);
    for (int r = 0; r < R; r++) begin
      send(CMD_ROW, '0, 1'b0, NC'($urandom));
      for (int c = 0; c < C; c++)
        if (st[NS + r*C + c] != pat[r*C + c]) send(CMD_WRITE, AW'(c), pat[r*C + c]);
      check(func_q[NS + r*C +: C], pat[r*C +: C], "row loaded");
      send(CMD_NEXT);
    end
  endtask

  initial begin
    cmd_valid = 1'b0; cmd_op = '0; cmd_col_addr = '0; cmd_wbit = 1'b0; cmd_si = '0;
    bist_en = 1'b0; si_w = 2'd2; te_w = 2'd0;
    {test_mode0, test_mode1} = 2'b00;
    st = '0; sig_s = '0; sig_r = '0; lfsr = 32'h1; sense = '0; row = 0; row_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Functional mode: every cell is a plain flip-flop of the circuit.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); st = cut_next(st); n_func++;
      @(posedge clk); #1 check(func_q, st, "functional state");
    end
    send(CMD_SHIFT);                       // refused in functional mode
    check(func_q, st, "state after refused command");

    // Mixed mode: load/unload both parts concurrently, capture between.
    set_mode(2'b01);
    send(CMD_CLEAR);
    for (int p = 0; p < 4; p++) begin
      mixed_pattern();
      send(CMD_CAPTURE);
    end

    // p-serial mode: chains only; a RAS command is refused.
    set_mode(2'b11);
    for (int i = 0; i < L; i++) send(CMD_SHIFT, '0, 1'b0, NC'($urandom));
    send(CMD_WRITE, 3'd1, 1'b1);
    send(CMD_CAPTURE);

    // p-random mode: RAS only; a shift is refused.
    set_mode(2'b10);
    send(CMD_START);
    for (int r = 0; r < 3; r++) begin
      send(CMD_ROW);
      send(CMD_WRITE, AW'($urandom), $urandom_range(0, 1));
      send(CMD_NEXT);
    end
    send(CMD_SHIFT, '0, 1'b0, 3'b111);
    send(CMD_CAPTURE);

    // Weighted BIST in p-serial mode: generator drives si, weighted test
    // enables deactivate chains now and then.
    set_mode(2'b11);
    bist_en = 1'b1; si_w = 2'd3; te_w = 2'd2;
    for (int i = 0; i < 40; i++) begin
      send(CMD_SHIFT);
      if (i % 10 == 9) send(CMD_CAPTURE);
    end
    bist_en = 1'b0;

    // Unload both signatures: serial MISR first, then the RAS MISR.
    for (int i = 0; i < 2 * MISR_W; i++) send(CMD_SIG);
    check({sig_s, sig_r}, '0, "signatures emptied");

    // Back to functional mode.
    set_mode(2'b00);
    st = cut_next(st); n_func++;           // the edge right after the switch
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); st = cut_next(st); n_func++;
      @(posedge clk); #1 check(func_q, st, "functional state again");
    end

    $display("functional=%0d mixed_rows=%0d ras_writes=%0d serial_shifts=%0d ras_reads=%0d",
             n_func, n_mixed_row, n_write, n_ser_shift, n_ras_read);
    $display("refused=%0d bist_shifts=%0d deactivated=%0d captures=%0d sig_bits=%0d row_stalls=%0d",
             n_refused, n_bist, n_deact, n_capture, n_sig, n_stall);
    if (n_func == 0 || n_mixed_row == 0 || n_write == 0 || n_ser_shift == 0 ||
        n_ras_read == 0 || n_refused < 3 || n_bist == 0 || n_deact == 0 ||
        n_capture == 0 || n_sig == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
