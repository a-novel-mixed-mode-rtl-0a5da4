// Self-checking testbench for mms_sense_amp: registered read of the bit
// lines on sense, hold otherwise, and the error flag for unresolved columns.
module tb_mms_sense_amp;
  localparam int COLS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sense, err, exp_err;
  logic [COLS-1:0] rd_bl, rd_blb, data, exp_data;
  int checks = 0, failures = 0;

  mms_sense_amp #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    sense = 1'b0; rd_bl = '0; rd_blb = '0;
    exp_data = '0; exp_err = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      sense = $urandom_range(0, 1);
      rd_bl = COLS'($urandom);
      rd_blb = ($urandom_range(0, 3) == 0) ? COLS'($urandom) : ~rd_bl;
      if (sense) begin
        exp_data = rd_bl;
        exp_err  = (rd_bl ^ rd_blb) != '1;
      end
      @(posedge clk); #1;
      checks++;
      if (data !== exp_data || err !== exp_err) begin
        failures++;
        $display("FAIL: got %h/%b exp %h/%b", data, err, exp_data, exp_err);
      end
    end
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
