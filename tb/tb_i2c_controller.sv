// tb_i2c_controller: self-checking test of i2c_controller at its default
// divider (125 clocks per SCL period, 400 kHz at 50 MHz). A CODEC I2C model
// acknowledges and records the writes. Checks: exactly 16 three-byte writes
// with the expected bytes (device address 0x34, register, data), no protocol
// errors, an SCL period of 125 clocks, init_done low until the last STOP and
// high afterwards with the bus idle, and the total time of 16*30*125 clocks.
module tb_i2c_controller;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  wire  sda;
  logic sda_oe;
  logic scl;
  logic init_done;
  int   checks = 0, failures = 0;

  pullup (sda);

  i2c_controller dut (.clk, .rst_n, .sda_oe, .scl, .init_done);
  assign sda = sda_oe ? 1'b0 : 1'bz;  // open-drain pad
  wm8731_i2c_model codec (.sda, .scl);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {0x34, reg_addr<<1 | data[8], data[7:0]} of the 16 configuration writes
  localparam logic [23:0] EXPECTED [16] = '{
    24'h341E00, 24'h340C10, 24'h340017, 24'h340217, 24'h340479, 24'h340679,
    24'h340814, 24'h340A00, 24'h340E42, 24'h341000, 24'h341201, 24'h340C00,
    24'h340017, 24'h340217, 24'h340479, 24'h340679 };

  int cycles = 0;
  int last_rise = -1, period = 0, n_periods = 0, bad_periods = 0;
  logic scl_d = 1'b1;
  int done_cycle = -1;
  int early_done = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      scl_d <= scl;
      if (scl && !scl_d) begin
        if (last_rise >= 0) begin
          period = cycles - last_rise;
          // Consecutive data-bit clocks are one slot apart.
          if (period < 125) bad_periods++;
          if (period == 125) n_periods++;
        end
        last_rise = cycles;
      end
      if (init_done && done_cycle < 0) done_cycle = cycles;
      if (init_done && codec.n_writes < 16) early_done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    repeat (2000) @(posedge clk);

    checks++;
    if (codec.n_writes != 16) begin
      failures++;
      $display("saw %0d writes, expected 16", codec.n_writes);
    end
    for (int i = 0; i < 16 && i < codec.n_writes; i++) begin
      checks++;
      if (codec.words[i] !== EXPECTED[i]) begin
        failures++;
        $display("write %0d: got %h expected %h", i, codec.words[i], EXPECTED[i]);
      end
    end
    checks++;
    if (codec.errors != 0) begin
      failures++;
      $display("%0d protocol errors", codec.errors);
    end
    checks++;
    if (bad_periods != 0 || n_periods < 16 * 27 - 16) begin
      failures++;
      $display("SCL periods: %0d of 125 clocks, %0d too short", n_periods, bad_periods);
    end
    checks++;
    if (early_done != 0) begin
      failures++;
      $display("init_done rose before the last write");
    end
    checks++;
    if (done_cycle < 16 * 30 * 125 - 5 || done_cycle > 16 * 30 * 125 + 5) begin
      failures++;
      $display("init_done after %0d clocks, expected about %0d", done_cycle, 16 * 30 * 125);
    end
    checks++;
    if (!init_done || !scl || sda !== 1'b1) begin
      failures++;
      $display("bus not idle after configuration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
