// tb_i2c_cmd_rom: checks every entry of i2c_cmd_rom against the WM8731
// configuration table written out independently here (device address 0x1A,
// register address, 9-bit data).
module tb_i2c_cmd_rom;
  import nc_pkg::*;
  logic [3:0] idx;
  i2c_cmd_t   cmd;
  int checks = 0, failures = 0;

  i2c_cmd_rom dut (.idx, .cmd);

  localparam logic [15:0] TABLE [16] = '{  // {reg_addr[6:0], data[8:0]}
    {7'h0F, 9'h000}, {7'h06, 9'h010}, {7'h00, 9'h017}, {7'h01, 9'h017},
    {7'h02, 9'h079}, {7'h03, 9'h079}, {7'h04, 9'h014}, {7'h05, 9'h000},
    {7'h07, 9'h042}, {7'h08, 9'h000}, {7'h09, 9'h001}, {7'h06, 9'h000},
    {7'h00, 9'h017}, {7'h01, 9'h017}, {7'h02, 9'h079}, {7'h03, 9'h079} };

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      idx = 4'(i);
      #10;
      checks++;
      if (cmd.dev_addr !== 7'h1A || {cmd.reg_addr, cmd.data} !== TABLE[i]) begin
        failures++;
        $display("entry %0d: %h %h %h", i, cmd.dev_addr, cmd.reg_addr, cmd.data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
