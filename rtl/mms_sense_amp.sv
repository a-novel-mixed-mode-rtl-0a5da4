// Sense amplifier row of the random-access-scan part, as a digital model.
//
// On sense it registers the read bit lines of every column (the bit read from
// the selected row) into data. A column whose lines do not differ (no row or
// more than one row selected) cannot be resolved; err is registered high for
// that read. In silicon this is an analog differential amplifier; here it is a
// register that samples on the rising clk edge, so data is valid the cycle
// after sense.
module mms_sense_amp #(
  parameter int unsigned COLS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sense,
  input  logic [COLS-1:0] rd_bl,
  input  logic [COLS-1:0] rd_blb,
  output logic [COLS-1:0] data,
  output logic            err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data <= '0;
      err  <= 1'b0;
    end else if (sense) begin
      data <= rd_bl;
      err  <= ~&(rd_bl ^ rd_blb);
    end
  end

endmodule
