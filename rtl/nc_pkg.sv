// nc_pkg: types and constants shared by the adaptive noise cancellation
// peripheral. Holds the Avalon-MM register word addresses and bit positions
// (the register map of the peripheral), the fixed-point widths of the LMS
// datapath, the LMS controller state type and the I2C command record type.
// Register offsets, widths and reset values follow the peripheral's
// specification; the coefficient format (Q2.22) is this design's choice.
package nc_pkg;

  // ---------------- Avalon-MM register map (word addresses) ----------------
  localparam logic [4:0] REG_STATUS     = 5'd0;  // byte offset 0x00
  localparam logic [4:0] REG_CONTROL    = 5'd1;  // byte offset 0x04
  localparam logic [4:0] REG_STEP_SIZE  = 5'd2;  // byte offset 0x08
  localparam logic [4:0] REG_TAP_COUNT  = 5'd3;  // byte offset 0x0C
  localparam logic [4:0] REG_MIC_SAMPLE = 5'd4;  // byte offset 0x10
  localparam logic [4:0] REG_REF_SAMPLE = 5'd5;  // byte offset 0x14
  localparam logic [4:0] REG_OUT_SAMPLE = 5'd6;  // byte offset 0x18
  localparam logic [4:0] REG_IRQ_ENABLE = 5'd7;  // byte offset 0x1C

  // STATUS bits
  localparam int STAT_SAMPLE_RDY = 0;
  localparam int STAT_BUSY       = 1;
  // CONTROL bits
  localparam int CTRL_BYPASS     = 0;
  localparam int CTRL_RESET      = 1;

  // Reset values
  localparam logic [15:0] STEP_SIZE_DEFAULT = 16'h0100;  // ~0.004 in Q0.16
  localparam logic [7:0]  TAP_COUNT_DEFAULT = 8'd32;
  localparam logic [7:0]  TAP_COUNT_MIN     = 8'd1;
  localparam logic [7:0]  TAP_COUNT_MAX     = 8'd64;

  // ---------------- LMS datapath ----------------
  localparam int N_TAPS      = 64;   // maximum number of taps
  localparam int DATA_W      = 16;   // Q1.15 audio samples
  localparam int COEFF_W     = 24;   // Q2.22 coefficients

  typedef enum logic [1:0] {
    LMS_IDLE    = 2'd0,
    LMS_PREDICT = 2'd1,
    LMS_SUB     = 2'd2,
    LMS_UPDATE  = 2'd3
  } lms_state_t;

  // ---------------- I2C CODEC configuration ----------------
  localparam int          I2C_NUM_CMDS   = 16;
  localparam logic [6:0]  WM8731_DEV_ADR = 7'h1A;  // 0x34 >> 1, R/W bit = 0

  // One register-write command: {dev_addr[6:0], reg_addr[6:0], data[8:0]}
  typedef struct packed {
    logic [6:0] dev_addr;
    logic [6:0] reg_addr;
    logic [8:0] data;
  } i2c_cmd_t;

endpackage
