// audio_codec_interface: I2S link to the WM8731 CODEC, which is bus master
// and drives BCLK (3.072 MHz) and the ADC/DAC LR clocks (48 kHz).
//
// How it works: BCLK, both LR clocks and ADCDAT are brought into the 50 MHz
// domain by two-flop synchronisers; BCLK edges and LR clock changes are then
// found by comparing each synchronised signal with its previous value. All
// four pass through identical synchronisers, so their relative timing is
// kept. Each half frame (LR clock low = left = reference x[n], high = right
// = microphone d[n]) carries 16 bits, MSB first, starting one BCLK after the
// LR clock change (I2S alignment). ADCDAT is sampled on BCLK falling edges:
// the first falling edge after an ADC LR change is the alignment slot, the
// next 16 carry bits 15..0. When the right (microphone) word is complete,
// both words are copied to mic_sample/ref_sample and sample_valid pulses for
// one clock, once per 48 kHz frame. On each DAC LR change the DAC shift
// register loads dac_sample (the filter output e[n], sent on both channels);
// DACDAT then changes on BCLK rising edges, MSB in the second BCLK period of
// the half frame, zeros after the LSB.
//
// Nothing runs (no samples, DACDAT low) until init_done from i2c_controller
// is high. Latency: about three clocks from a BCLK edge to its effect.
// Taken from the specification: pin set, bit order, word length, channel
// assignment, the edges used and the synchroniser. This design's choices:
// the one-BCLK I2S alignment, the CODEC changing ADCDAT and LR clocks on BCLK
// rising edges (so they are stable at the falling edge used for sampling),
// same e[n] on both DAC channels, and sample_valid after the right channel.
module audio_codec_interface
  import nc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_done,   // enable, from i2c_controller
  // I2S pins
  input  logic              bclk,        // bit clock, asynchronous to clk
  input  logic              adc_lrclk,   // high = right (mic)
  input  logic              dac_lrclk,
  input  logic              adcdat,
  output logic              dacdat,
  // Parallel sample interface, synchronous to clk
  output logic [DATA_W-1:0] mic_sample,  // d[n], right channel
  output logic [DATA_W-1:0] ref_sample,  // x[n], left channel
  input  logic [DATA_W-1:0] dac_sample,  // e[n], to the DAC serialiser
  output logic              sample_valid // one-clock strobe per frame
);

  // Two-flop synchronisers plus one history stage for edge detection.
  logic [1:0] bclk_s, adclr_s, daclr_s, adat_s;
  logic       bclk_d, adclr_d, daclr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_s  <= '0; adclr_s <= '0; daclr_s <= '0; adat_s <= '0;
      bclk_d  <= 1'b0; adclr_d <= 1'b0; daclr_d <= 1'b0;
    end else begin
      bclk_s  <= {bclk_s[0], bclk};
      adclr_s <= {adclr_s[0], adc_lrclk};
      daclr_s <= {daclr_s[0], dac_lrclk};
      adat_s  <= {adat_s[0], adcdat};
      bclk_d  <= bclk_s[1];
      adclr_d <= adclr_s[1];
      daclr_d <= daclr_s[1];
    end
  end

  logic bclk_rise, bclk_fall, adclr_chg, daclr_chg;
  assign bclk_rise = bclk_s[1] & ~bclk_d;
  assign bclk_fall = ~bclk_s[1] & bclk_d;
  assign adclr_chg = adclr_s[1] ^ adclr_d;
  assign daclr_chg = daclr_s[1] ^ daclr_d;

  // ---------------- ADC deserialiser ----------------
  logic [4:0]        adc_cnt;      // falling edges since the LR change
  logic [DATA_W-2:0] adc_sr;       // first 15 bits of the word
  logic [DATA_W-1:0] left_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_cnt      <= '1;
      adc_sr       <= '0;
      left_word    <= '0;
      mic_sample   <= '0;
      ref_sample   <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (!init_done) begin
        adc_cnt <= '1;
      end else if (adclr_chg) begin
        adc_cnt <= '0;
      end else if (bclk_fall && adc_cnt <= 5'd16) begin
        adc_cnt <= adc_cnt + 1'b1;
        if (adc_cnt != 5'd0) begin
          adc_sr <= {adc_sr[DATA_W-3:0], adat_s[1]};
          if (adc_cnt == 5'd16) begin
            if (adclr_s[1]) begin
              // right channel finished: the frame is complete
              mic_sample   <= {adc_sr[DATA_W-2:0], adat_s[1]};
              ref_sample   <= left_word;
              sample_valid <= 1'b1;
            end else begin
              left_word <= {adc_sr[DATA_W-2:0], adat_s[1]};
            end
          end
        end
      end
    end
  end

  // ---------------- DAC serialiser ----------------
  logic [4:0]        dac_cnt;
  logic [DATA_W-1:0] dac_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_cnt <= '1;
      dac_sr  <= '0;
      dacdat  <= 1'b0;
    end else if (!init_done) begin
      dac_cnt <= '1;
      dacdat  <= 1'b0;
    end else if (daclr_chg) begin
      // The LR change coincides with the alignment-slot BCLK rising edge.
      dac_sr  <= dac_sample;
      dac_cnt <= '0;
      dacdat  <= 1'b0;
    end else if (bclk_rise) begin
      if (dac_cnt < 5'd16) begin
        dacdat  <= dac_sr[DATA_W-1];
        dac_sr  <= {dac_sr[DATA_W-2:0], 1'b0};
        dac_cnt <= dac_cnt + 1'b1;
      end else begin
        dacdat <= 1'b0;
      end
    end
  end

endmodule
