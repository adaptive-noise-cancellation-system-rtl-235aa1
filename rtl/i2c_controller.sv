// i2c_controller: write-only I2C master that configures the WM8731 CODEC once
// after reset. It walks the 16 entries of i2c_cmd_rom and sends each as a
// three-byte write transaction
//   START, [dev_addr[6:0] | W=0], [reg_addr[6:0] | data[8]], [data[7:0]], STOP
// and, after the last one, holds init_done high and leaves the bus idle.
//
// Timing: every bus bit occupies one "slot" of CLK_DIV system clocks
// (125 at 50 MHz gives the specified 400 kHz). Within a data slot SCL is low
// for the first CLK_DIV/2 clocks and high for the rest; SDA changes a quarter
// slot after SCL falls. START holds SCL high and pulls SDA low at mid-slot;
// STOP pulls SDA low, raises SCL, then releases SDA at three quarters of the
// slot. One idle slot separates transactions. A transaction is 30 slots, so
// the whole sequence takes 16*30*CLK_DIV clocks (60,000 at the default).
//
// SDA is open drain: the controller only pulls it low (sda_oe = 1) or
// releases it to an external pull-up; the three-state pad driver itself sits
// in the top level, so this module has no bidirectional port. The ninth (acknowledge) bit of each byte is released for
// the CODEC to drive; its value is not checked and there is no retry. SCL is
// driven push-pull, as the CODEC never stretches the clock. Those two points
// and the slot layout are this design's choices; the divider, the byte
// format and the 16-write sequence follow the specification.
module i2c_controller
  import nc_pkg::*;
#(
  parameter int unsigned CLK_DIV = 125  // system clocks per SCL period
) (
  input  logic clk,
  input  logic rst_n,
  output logic sda_oe,     // 1: pull SDA low, 0: release it
  output logic scl,        // I2C clock
  output logic init_done   // high after all 16 CODEC registers are written
);

  localparam int unsigned HALF = CLK_DIV / 2;
  localparam int unsigned Q1   = CLK_DIV / 4;
  localparam int unsigned Q3   = HALF + Q1;
  localparam int          CW   = $clog2(CLK_DIV);

  typedef enum logic [2:0] {
    S_GAP, S_START, S_BIT, S_STOP, S_DONE
  } i2c_state_t;

  i2c_state_t   state;
  logic [CW-1:0] cnt;
  logic [3:0]   cmd_idx;
  logic [1:0]   byte_cnt;
  logic [3:0]   bit_cnt;     // 0..7 data bits, 8 = acknowledge
  logic         sda_low;     // 1: pull SDA low
  i2c_cmd_t     cmd;
  logic [7:0]   cur_byte;
  logic         cur_bit;
  logic         slot_end;

  i2c_cmd_rom u_rom (.idx(cmd_idx), .cmd(cmd));

  always_comb begin
    unique case (byte_cnt)
      2'd0:    cur_byte = {cmd.dev_addr, 1'b0};
      2'd1:    cur_byte = {cmd.reg_addr, cmd.data[8]};
      default: cur_byte = cmd.data[7:0];
    endcase
    // MSB first; the acknowledge slot releases the line.
    cur_bit  = (bit_cnt == 4'd8) ? 1'b1 : cur_byte[3'd7 - bit_cnt[2:0]];
    slot_end = (cnt == CW'(CLK_DIV - 1));
  end

  assign sda_oe = sda_low;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_GAP;
      cnt       <= '0;
      cmd_idx   <= '0;
      byte_cnt  <= '0;
      bit_cnt   <= '0;
      sda_low   <= 1'b0;
      scl       <= 1'b1;
      init_done <= 1'b0;
    end else begin
      cnt <= slot_end ? '0 : cnt + 1'b1;

      // Line levels within the current slot.
      unique case (state)
        S_GAP, S_DONE: begin
          scl     <= 1'b1;
          sda_low <= 1'b0;
        end
        S_START: begin
          scl <= 1'b1;
          if (cnt == CW'(HALF)) sda_low <= 1'b1;
        end
        S_BIT: begin
          scl <= (cnt >= CW'(HALF));
          if (cnt == CW'(Q1)) sda_low <= ~cur_bit;
        end
        S_STOP: begin
          scl <= (cnt >= CW'(HALF));
          if (cnt == CW'(Q1)) sda_low <= 1'b1;
          if (cnt == CW'(Q3)) sda_low <= 1'b0;
        end
        default: ;
      endcase

      // Slot sequencing.
      if (slot_end) begin
        unique case (state)
          S_GAP: state <= S_START;
          S_START: begin
            state    <= S_BIT;
            byte_cnt <= '0;
            bit_cnt  <= '0;
          end
          S_BIT: begin
            if (bit_cnt == 4'd8) begin
              bit_cnt <= '0;
              if (byte_cnt == 2'd2) state <= S_STOP;
              else byte_cnt <= byte_cnt + 1'b1;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
          S_STOP: begin
            if (cmd_idx == 4'(I2C_NUM_CMDS - 1)) begin
              state     <= S_DONE;
              init_done <= 1'b1;
            end else begin
              cmd_idx <= cmd_idx + 1'b1;
              state   <= S_GAP;
            end
          end
          default: state <= S_DONE;
        endcase
      end
    end
  end

endmodule
