// wm8731_i2c_model: behavioural model of the WM8731 CODEC's I2C control port,
// for testbenches only. It recognises START and STOP, shifts in bytes on SCL
// rising edges, acknowledges every byte by pulling SDA low for the ninth
// clock, and records each complete three-byte write as a 24-bit word in
// words[]. A transaction that does not hold exactly three bytes, or data that
// changes while SCL is high, counts in errors. The bus needs a pull-up on SDA
// in the testbench.
module wm8731_i2c_model (
  inout wire  sda,
  input logic scl
);
  logic        ack_drv = 1'b0;
  logic        in_txn = 1'b0;
  logic [7:0]  sh = '0;
  logic [23:0] cur = '0;
  int          bitn = 0;
  int          nbytes = 0;
  int          n_writes = 0;
  int          errors = 0;
  logic [23:0] words [64];

  assign sda = ack_drv ? 1'b0 : 1'bz;

  always @(negedge sda) begin
    if (scl) begin  // START (repeated START is counted as an error)
      if (in_txn) errors++;
      in_txn = 1'b1;
      bitn   = 0;
      nbytes = 0;
    end
  end

  always @(posedge sda) begin
    if (scl && in_txn) begin  // STOP
      // the SCL pulse of the STOP itself leaves bitn at 1
      if (bitn > 1 || nbytes != 3) errors++;
      else if (n_writes < 64) words[n_writes] = cur;
      n_writes++;
      in_txn = 1'b0;
    end
  end

  always @(posedge scl) begin
    if (in_txn) begin
      if (bitn < 8) sh = {sh[6:0], sda};
      bitn++;
    end
  end

  always @(negedge scl) begin
    if (in_txn) begin
      if (bitn == 8) begin
        ack_drv = 1'b1;
        cur     = {cur[15:0], sh};
        nbytes++;
      end else if (bitn == 9) begin
        ack_drv = 1'b0;
        bitn    = 0;
      end
    end
  end
endmodule
