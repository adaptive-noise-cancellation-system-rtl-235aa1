// tb_audio_codec_interface: self-checking test of the I2S interface against a
// CODEC model running at the real rates (50 MHz system clock, 3.072 MHz BCLK,
// 48 kHz frames). Checks: nothing happens before init_done (no sample_valid,
// DACDAT low); afterwards one single-clock sample_valid per frame, spaced
// 64 BCLK periods (about 1,042 clocks) apart; mic_sample equals the right
// word and ref_sample the left word the CODEC sent in that frame; the DAC
// words the CODEC receives equal dac_sample as it stood when each half frame
// began. Words are random, extreme values included.
module tb_audio_codec_interface;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        init_done = 1'b0;
  logic        bclk, adc_lrclk, dac_lrclk, adcdat, dacdat;
  logic [15:0] mic_sample, ref_sample;
  logic [15:0] dac_sample = '0;
  logic        sample_valid;
  logic [15:0] left_word = '0, right_word = '0;
  logic [15:0] cur_left, cur_right, dac_left, dac_right;
  int          frames;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  audio_codec_interface dut (.*);
  wm8731_i2s_model codec (
    .bclk, .adc_lrclk, .dac_lrclk, .adcdat, .dacdat,
    .left_word, .right_word, .cur_left, .cur_right, .dac_left, .dac_right, .frames);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pick();
    int sel = $urandom_range(5, 0);
    unique case (sel)
      0:       return 16'h8000;
      1:       return 16'h7FFF;
      default: return 16'($urandom);
    endcase
  endfunction

  // New ADC words for every half frame, chosen when the other half starts.
  always @(posedge adc_lrclk) left_word = pick();
  always @(negedge adc_lrclk) right_word = pick();

  // DAC words expected at the start of each half frame.
  logic [15:0] exp_l = '0, exp_r = '0;
  always @(negedge dac_lrclk) exp_l = dac_sample;
  always @(posedge dac_lrclk) exp_r = dac_sample;

  int enabled_frame = -1;
  int pre_valid = 0, pre_dac = 0;
  int n_valid = 0, last_valid = -1, cyc = 0;
  logic sv_d = 1'b0;

  always @(posedge clk) begin
    cyc++;
    sv_d <= sample_valid;
    if (rst_n && !init_done) begin
      if (sample_valid) pre_valid++;
      if (dacdat) pre_dac++;
    end
    if (sample_valid) begin
      n_valid++;
      checks++;
      if (mic_sample !== cur_right || ref_sample !== cur_left) begin
        failures++;
        $display("frame %0d: mic %h/%h ref %h/%h", frames, mic_sample, cur_right,
                 ref_sample, cur_left);
      end
      checks++;
      if (sv_d) begin
        failures++;
        $display("sample_valid longer than one clock");
      end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid < 1040 || cyc - last_valid > 1043) begin
          failures++;
          $display("sample_valid spacing %0d clocks", cyc - last_valid);
        end
      end
      last_valid = cyc;
      // New filter output a few clocks later, as the LMS filter would do.
      dac_sample <= pick();
    end
  end

  // DAC check once the interface has run a full frame.
  always @(frames) begin
    if (enabled_frame >= 0 && frames > enabled_frame + 1) begin
      checks++;
      if (dac_left !== exp_l || dac_right !== exp_r) begin
        failures++;
        $display("frame %0d: DAC %h %h expected %h %h", frames, dac_left, dac_right,
                 exp_l, exp_r);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (frames == 3);
    checks++;
    if (pre_valid != 0 || pre_dac != 0) begin
      failures++;
      $display("activity before init_done");
    end
    @(posedge clk);
    init_done <= 1'b1;
    enabled_frame = frames;
    wait (frames == 3 + 150);
    checks++;
    if (n_valid < 149 || n_valid > 150) begin
      failures++;
      $display("%0d sample_valid pulses in 150 frames", n_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
