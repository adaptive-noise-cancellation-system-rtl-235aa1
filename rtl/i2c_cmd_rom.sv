// i2c_cmd_rom: the fixed table of WM8731 register writes sent once at
// startup by i2c_controller. Sixteen entries, each one command record
// {dev_addr[6:0], reg_addr[6:0], data[8:0]} (nc_pkg::i2c_cmd_t), read
// combinationally by index. The table is held in logic (a case statement),
// matching the "registers, read-only" implementation of the specification.
//
// The specification fixes the count (16) and the record layout; the register
// values are this design's choice for the WM8731: reset, line-in and
// headphone gains at 0 dB, microphone to ADC, DAC to output, I2S 16-bit with
// the CODEC as bus master (it drives BCLK and the LR clocks), 48 kHz from a
// 12.288 MHz MCLK, then activate and power up the outputs. Entries 12-15
// repeat the gain writes so the sequence has the specified sixteen writes.
//
// Output bits that are equal in every entry (the device address, the upper
// register-address bits, data[8:7]) synthesise to constants.
// Interface: idx selects the entry; cmd is valid in the same cycle.
module i2c_cmd_rom
  import nc_pkg::*;
(
  input  logic [3:0] idx,
  output i2c_cmd_t   cmd
);

  logic [6:0] reg_addr;
  logic [8:0] data;

  always_comb begin
    unique case (idx)
      4'd0:  begin reg_addr = 7'h0F; data = 9'h000; end  // reset
      4'd1:  begin reg_addr = 7'h06; data = 9'h010; end  // power on, outputs off
      4'd2:  begin reg_addr = 7'h00; data = 9'h017; end  // left line in 0 dB
      4'd3:  begin reg_addr = 7'h01; data = 9'h017; end  // right line in 0 dB
      4'd4:  begin reg_addr = 7'h02; data = 9'h079; end  // left headphone 0 dB
      4'd5:  begin reg_addr = 7'h03; data = 9'h079; end  // right headphone 0 dB
      4'd6:  begin reg_addr = 7'h04; data = 9'h014; end  // mic to ADC, DAC select
      4'd7:  begin reg_addr = 7'h05; data = 9'h000; end  // DAC unmuted, HPF on
      4'd8:  begin reg_addr = 7'h07; data = 9'h042; end  // I2S, 16 bit, master
      4'd9:  begin reg_addr = 7'h08; data = 9'h000; end  // 48 kHz, normal mode
      4'd10: begin reg_addr = 7'h09; data = 9'h001; end  // activate interface
      4'd11: begin reg_addr = 7'h06; data = 9'h000; end  // power up outputs
      4'd12: begin reg_addr = 7'h00; data = 9'h017; end  // repeat gain writes
      4'd13: begin reg_addr = 7'h01; data = 9'h017; end
      4'd14: begin reg_addr = 7'h02; data = 9'h079; end
      default: begin reg_addr = 7'h03; data = 9'h079; end
    endcase
    cmd = '{dev_addr: WM8731_DEV_ADR, reg_addr: reg_addr, data: data};
  end

endmodule
