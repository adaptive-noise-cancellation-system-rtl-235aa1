// noise_cancel_top: FPGA peripheral of a real-time adaptive noise canceller.
// A WM8731 CODEC digitises a noisy microphone (speech + noise, d[n]) and a
// reference input that picks up only the noise (x[n]); an LMS adaptive FIR
// filter learns the path from the reference to the microphone, predicts the
// noise in d[n] and subtracts it, and the result e[n] goes back out of the
// CODEC's headphone output. The HPS (ARM) only tunes the filter through an
// Avalon-MM register file and never touches the sample path.
//
// Blocks and connections (all in the CLOCK_50 domain, asynchronous
// active-low reset):
//   i2c_controller        configures the CODEC at startup, then init_done
//   audio_codec_interface I2S in/out; gated by init_done; mic/ref samples and
//                         a one-clock sample_valid per 48 kHz frame
//   lms_filter            computes e[n] in 2L+1 clocks after sample_valid
//   avalon_regs           STATUS, CONTROL, STEP_SIZE, TAP_COUNT, snapshots,
//                         IRQ_ENABLE; drives step/taps/bypass/filter_reset
// The CODEC master clock AUD_XCK (12.288 MHz) cannot be made from 50 MHz by
// logic; it comes from a PLL outside this design through aud_xck_pll and is
// passed to the pin. The open-drain driver of the I2C data pin (pull low or
// release to the board pull-up) is here, fed by i2c_controller's sda_oe.
// All other ports follow the specification's pin list.
module noise_cancel_top
  import nc_pkg::*;
(
  input  logic        CLOCK_50,      // 50 MHz system clock
  input  logic        reset_n,       // active-low reset
  // Audio CODEC pins
  input  logic        AUD_BCLK,      // 3.072 MHz bit clock from the CODEC
  input  logic        AUD_DACLCK,    // 48 kHz DAC LR clock
  input  logic        AUD_ADCLK,     // 48 kHz ADC LR clock
  input  logic        AUD_ADCDAT,    // serial ADC data (into the FPGA)
  output logic        AUD_DACDAT,    // serial DAC data (out of the FPGA)
  output logic        AUD_XCK,       // 12.288 MHz master clock to the CODEC
  input  logic        aud_xck_pll,   // 12.288 MHz from the external audio PLL
  // I2C (CODEC configuration)
  inout  wire         FPGA_I2C_SDAT, // open-drain data
  output logic        FPGA_I2C_SCLK, // 400 kHz clock
  // Avalon-MM slave (lightweight HPS-to-FPGA bridge)
  input  logic [4:0]  avs_address,   // word address
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_irq        // level interrupt to the HPS GIC
);

  logic                  init_done;
  logic [DATA_W-1:0]     mic_sample, ref_sample, audio_out;
  logic                  sample_valid;
  logic                  busy;
  logic [15:0]           step_size;
  logic [7:0]            tap_count;
  logic                  bypass, filter_reset;
  logic                  i2c_sda_oe;

  assign AUD_XCK = aud_xck_pll;

  // Open-drain I2C data pad: pull low or release to the board pull-up.
  assign FPGA_I2C_SDAT = i2c_sda_oe ? 1'b0 : 1'bz;

  i2c_controller u_i2c (
    .clk       (CLOCK_50),
    .rst_n     (reset_n),
    .sda_oe    (i2c_sda_oe),
    .scl       (FPGA_I2C_SCLK),
    .init_done (init_done)
  );

  audio_codec_interface u_codec_if (
    .clk          (CLOCK_50),
    .rst_n        (reset_n),
    .init_done    (init_done),
    .bclk         (AUD_BCLK),
    .adc_lrclk    (AUD_ADCLK),
    .dac_lrclk    (AUD_DACLCK),
    .adcdat       (AUD_ADCDAT),
    .dacdat       (AUD_DACDAT),
    .mic_sample   (mic_sample),
    .ref_sample   (ref_sample),
    .dac_sample   (audio_out),
    .sample_valid (sample_valid)
  );

  lms_filter #(.N(N_TAPS), .DATA_WIDTH(DATA_W), .COEFF_WIDTH(COEFF_W)) u_lms (
    .clk          (CLOCK_50),
    .rst_n        (reset_n),
    .mic_in       (mic_sample),
    .ref_in       (ref_sample),
    .sample_valid (sample_valid),
    .step_size    (step_size),
    .tap_count    (tap_count),
    .bypass       (bypass),
    .filter_reset (filter_reset),
    .audio_out    (audio_out),
    .busy         (busy)
  );

  avalon_regs u_regs (
    .clk          (CLOCK_50),
    .rst_n        (reset_n),
    .address      (avs_address),
    .read         (avs_read),
    .write        (avs_write),
    .writedata    (avs_writedata),
    .readdata     (avs_readdata),
    .irq          (avs_irq),
    .mic_sample   (mic_sample),
    .ref_sample   (ref_sample),
    .out_sample   (audio_out),
    .sample_valid (sample_valid),
    .busy         (busy),
    .step_size    (step_size),
    .tap_count    (tap_count),
    .bypass       (bypass),
    .filter_reset (filter_reset)
  );

endmodule
