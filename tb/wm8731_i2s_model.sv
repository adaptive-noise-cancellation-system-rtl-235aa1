// wm8731_i2s_model: behavioural model of the WM8731 CODEC's digital audio
// interface in I2S master mode, for testbenches only. It generates BCLK
// (half period BCLK_HALF_NS nanoseconds) and both LR clocks, 32 BCLK periods
// per channel. The LR clocks and ADCDAT change on BCLK rising edges; each
// channel word is 16 bits, MSB first, in BCLK periods 1..16 of its half
// frame (I2S alignment). left_word and right_word are taken at the start of
// each half frame (cur_left/cur_right show the words of the current frame).
// DACDAT is sampled on BCLK falling edges in the same periods; the words
// received appear on dac_left/dac_right, and frames counts completed frames.
module wm8731_i2s_model #(
  parameter real BCLK_HALF_NS = 162.76   // 3.072 MHz
) (
  output logic        bclk,
  output logic        adc_lrclk,
  output logic        dac_lrclk,
  output logic        adcdat,
  input  logic        dacdat,
  input  logic [15:0] left_word,
  input  logic [15:0] right_word,
  output logic [15:0] cur_left,
  output logic [15:0] cur_right,
  output logic [15:0] dac_left,
  output logic [15:0] dac_right,
  output int          frames
);
  logic [15:0] word, dword;

  initial begin
    bclk = 1'b0; adc_lrclk = 1'b0; dac_lrclk = 1'b0; adcdat = 1'b0;
    dac_left = '0; dac_right = '0; cur_left = '0; cur_right = '0;
    frames = 0; word = '0; dword = '0;
    forever begin
      for (int ch = 0; ch < 2; ch++) begin
        for (int slot = 0; slot < 32; slot++) begin
          #(BCLK_HALF_NS) bclk = 1'b1;
          if (slot == 0) begin
            word = (ch == 1) ? right_word : left_word;
            if (ch == 1) cur_right = word; else cur_left = word;
            adc_lrclk = ch[0];
            dac_lrclk = ch[0];
          end
          adcdat = (slot >= 1 && slot <= 16) ? word[16 - slot] : 1'b0;
          #(BCLK_HALF_NS) bclk = 1'b0;
          if (slot >= 1 && slot <= 16) dword[16 - slot] = dacdat;
        end
        if (ch == 0) dac_left = dword;
        else begin
          dac_right = dword;
          frames++;
        end
      end
    end
  end
endmodule
