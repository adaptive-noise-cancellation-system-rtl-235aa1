// tb_noise_cancel_top: end-to-end test of the noise canceller at its default
// size (64-tap filter, 400 kHz I2C, real 48 kHz I2S timing), driven only
// through the top-level pins. A CODEC model configures over I2C and streams
// I2S audio; the testbench plays the HPS on the Avalon-MM port.
//
// Signal: reference x[n] is white noise (+-0.5); the microphone carries a
// 1 kHz square "speech" signal s[n] plus noise that reached it through the
// path 0.5 x[n-2] - 0.25 x[n-5]. The DAC word of frame n+1 carries e[n], so
// the residual is e[n] - s[n].
//
// Sequence and what is checked:
//   1. startup: 16 correct CODEC writes; before they finish no sample is
//      flagged and the DAC sends zeros (init_done gating)
//   2. HPS sets IRQ_ENABLE, STEP_SIZE, TAP_COUNT=16 (and a rejected 100)
//   3. 800 frames served by interrupt: each frame the snapshots must equal
//      the words on the wire, busy must last exactly 2L+1 clocks, the IRQ
//      must drop when STATUS[0] is cleared; the residual must fall by 20 dB
//   4. TAP_COUNT=4 cannot model the x[n-5] path: residual must stay high
//   5. bypass: busy never rises and the DAC carries d[n] unchanged
//   6. filter_reset: the next output equals d[n] exactly; it re-converges
//   7. polling mode: IRQ_ENABLE=0, STATUS[0] polled, the IRQ never rises
// Each mechanism is counted, and one that never happened is a failure.
module tb_noise_cancel_top;
  logic        clk = 1'b0;
  logic        reset_n = 1'b0;
  logic        bclk, adc_lrclk, dac_lrclk, adcdat, dacdat;
  logic        aud_xck;
  wire         sda;
  logic        scl;
  logic [4:0]  avs_address = '0;
  logic        avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0] avs_writedata = '0;
  logic [31:0] avs_readdata;
  logic        avs_irq;
  logic        xck = 1'b0;
  logic [15:0] left_word = '0, right_word = '0;
  logic [15:0] cur_left, cur_right, dac_left, dac_right;
  int          frames;
  int          checks = 0, failures = 0;

  pullup (sda);

  always #10 clk = ~clk;   // 50 MHz
  always #40.69 xck = ~xck;  // 12.288 MHz stand-in for the audio PLL

  noise_cancel_top dut (
    .CLOCK_50      (clk),
    .reset_n       (reset_n),
    .AUD_BCLK      (bclk),
    .AUD_DACLCK    (dac_lrclk),
    .AUD_ADCLK     (adc_lrclk),
    .AUD_ADCDAT    (adcdat),
    .AUD_DACDAT    (dacdat),
    .AUD_XCK       (aud_xck),
    .aud_xck_pll   (xck),
    .FPGA_I2C_SDAT (sda),
    .FPGA_I2C_SCLK (scl),
    .avs_address   (avs_address),
    .avs_read      (avs_read),
    .avs_write     (avs_write),
    .avs_writedata (avs_writedata),
    .avs_readdata  (avs_readdata),
    .avs_irq       (avs_irq)
  );

  wm8731_i2c_model i2c_codec (.sda, .scl);
  wm8731_i2s_model i2s_codec (
    .bclk, .adc_lrclk, .dac_lrclk, .adcdat, .dacdat,
    .left_word, .right_word, .cur_left, .cur_right, .dac_left, .dac_right, .frames);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAILED at frame %0d: %s", frames, what);
    end
  endtask

  // ---------------- audio source and sink ----------------
  localparam int MAXF = 4096;
  logic signed [15:0] xs [MAXF];
  logic signed [15:0] ss [MAXF];
  logic signed [15:0] ds [MAXF];
  logic signed [15:0] dac_hist [MAXF];

  function automatic logic signed [15:0] xat(int f);
    return (f < 0) ? 16'sd0 : xs[f];
  endfunction

  task automatic make_frame(int f);
    xs[f] = 16'($signed(16'($urandom)) >>> 1);
    ss[f] = ((f / 24) % 2 == 1) ? 16'sh0400 : -16'sh0400;
    ds[f] = 16'(int'(ss[f]) + (int'(xat(f - 2)) >>> 1) - (int'(xat(f - 5)) >>> 2));
    left_word  = xs[f];
    right_word = ds[f];
  endtask

  int n_lr_mismatch = 0;
  initial make_frame(0);
  always @(frames) begin
    dac_hist[frames - 1] = dac_left;
    if (dac_left !== dac_right) n_lr_mismatch++;
    if (frames < MAXF) make_frame(frames);
  end

  // energy of the residual e[g] - s[g] over frames [a, b)
  function automatic longint residual(int a, int b);
    longint acc = 0, r;
    for (int g = a; g < b; g++) begin
      r = longint'(dac_hist[g + 1]) - longint'(ss[g]);
      acc += r * r;
    end
    return acc;
  endfunction

  // ---------------- HPS bus master ----------------
  // Both tasks start at a falling clock edge and end at the next one, so a
  // sequence of accesses issues one per clock.
  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    avs_address = a; avs_read = 1'b1;
    #1 d = avs_readdata;
    @(negedge clk);
    avs_read = 1'b0;
  endtask

  // mechanism counters
  int n_gated = 0, n_irq = 0, n_polled = 0, n_busy_ok = 0, n_bypass = 0;
  int n_reset = 0, n_tap_change = 0, n_tap_reject = 0, n_step_change = 0;
  int n_converged = 0, n_short_taps = 0, n_snap_ok = 0;

  // Serve one frame: wait for sample_ready (IRQ or polling), count the busy
  // clocks, check the snapshots and clear the flag.
  task automatic serve(input bit use_irq, input int taps, input bit filtering);
    logic [31:0] v;
    int busy_n;
    if (use_irq) begin
      while (!avs_irq) @(negedge clk);
      n_irq++;
    end else begin
      v = '0;
      while (!v[0]) begin
        rd(5'd0, v);
        check(!avs_irq, "IRQ raised in polling mode");
      end
      n_polled++;
    end
    // the poll that found the flag already saw the first busy clock
    busy_n = use_irq ? 0 : int'(v[1]);
    for (int i = busy_n; i < 2 * taps + 10; i++) begin
      rd(5'd0, v);
      if (v[1]) busy_n++;
    end
    check(busy_n == (filtering ? 2 * taps + 1 : 0), $sformatf("busy for %0d clocks", busy_n));
    if (filtering && busy_n == 2 * taps + 1) n_busy_ok++;
    rd(5'd4, v); check(v == {16'h0, cur_right}, "MIC_SAMPLE snapshot");
    rd(5'd5, v); check(v == {16'h0, cur_left}, "REF_SAMPLE snapshot");
    rd(5'd6, v); check(v == {16'h0, dac_left}, "OUT_SAMPLE snapshot");
    n_snap_ok++;
    wr(5'd0, 32'h1);
    check(!avs_irq, "IRQ still high after clearing STATUS[0]");
    rd(5'd0, v); check(v[0] == 1'b0, "STATUS[0] not cleared");
  endtask

  logic [31:0] v;
  longint r_early, r_late, r_short, r_reset;
  int f0;

  initial begin
    repeat (5) @(negedge clk);
    reset_n = 1'b1;

    // 1. startup gating
    while (i2c_codec.n_writes < 16) begin
      rd(5'd0, v);
      if (frames > 2) begin
        check(v[0] == 1'b0 && dac_left == 16'h0, "activity before CODEC configuration");
        n_gated++;
      end
      repeat (500) @(negedge clk);
    end
    check(i2c_codec.errors == 0, "I2C protocol errors");
    check(i2c_codec.words[0] == 24'h341E00 && i2c_codec.words[8] == 24'h340E42 &&
          i2c_codec.words[10] == 24'h341201, "CODEC register writes");
    check(aud_xck == xck, "AUD_XCK follows the PLL clock");

    // 2. HPS configuration
    wr(5'd7, 32'h1);
    wr(5'd2, 32'h2000); n_step_change++;
    rd(5'd2, v); check(v == 32'h2000, "STEP_SIZE read-back");
    wr(5'd3, 32'd16); n_tap_change++;
    wr(5'd3, 32'd100);
    rd(5'd3, v); check(v == 32'd16, "TAP_COUNT rejects 100");
    if (v == 32'd16) n_tap_reject++;
    wr(5'd0, 32'h1);

    // 3. adaptation, interrupt driven
    f0 = frames + 1;
    for (int n = 0; n < 800; n++) serve(1'b1, 16, 1'b1);
    r_early = residual(f0 + 5, f0 + 105);
    r_late  = residual(frames - 101, frames - 1);
    $display("residual energy: first 100 frames %0d, last 100 frames %0d", r_early, r_late);
    check(r_late * 100 < r_early, "no 20 dB noise reduction after 800 frames");
    if (r_late * 100 < r_early) n_converged++;

    // 4. too few taps for the noise path
    wr(5'd3, 32'd4); n_tap_change++;
    for (int n = 0; n < 300; n++) serve(1'b1, 4, 1'b1);
    r_short = residual(frames - 101, frames - 1);
    $display("residual energy with 4 taps: %0d", r_short);
    check(r_short > 10 * r_late, "4 taps should not cancel a 6-tap path");
    if (r_short > 10 * r_late) n_short_taps++;
    wr(5'd3, 32'd16); n_tap_change++;
    for (int n = 0; n < 300; n++) serve(1'b1, 16, 1'b1);

    // 5. bypass
    wr(5'd1, 32'h1);
    serve(1'b1, 16, 1'b0);
    serve(1'b1, 16, 1'b0);
    for (int n = 0; n < 20; n++) begin
      serve(1'b1, 16, 1'b0);
      // DAC word of the last completed frame carries d of the frame before
      check(dac_hist[frames - 1] == ds[frames - 2], "bypass output differs from d[n]");
      n_bypass++;
    end
    wr(5'd1, 32'h0);

    // 6. filter_reset: weights zero, so e = d for the next sample
    wr(5'd1, 32'h2);
    rd(5'd1, v); check(v == 32'h0, "CONTROL[1] reads back 0");
    n_reset++;
    f0 = frames;
    serve(1'b1, 16, 1'b1);      // sample f0 is filtered with zero weights
    serve(1'b1, 16, 1'b1);
    check(dac_hist[f0 + 1] == ds[f0], "first output after filter_reset is not d[n]");
    for (int n = 0; n < 600; n++) serve(1'b1, 16, 1'b1);
    r_reset = residual(frames - 101, frames - 1);
    check(r_reset * 100 < r_early, "no re-convergence after filter_reset");

    // 7. polling mode
    wr(5'd7, 32'h0);
    for (int n = 0; n < 10; n++) serve(1'b0, 16, 1'b1);

    check(n_lr_mismatch == 0, "left and right DAC words differ");
    check(n_gated > 0, "startup gating never observed");
    check(n_irq > 0, "interrupt never served");
    check(n_polled > 0, "polling never used");
    check(n_busy_ok > 0, "busy window never measured");
    check(n_bypass > 0, "bypass never exercised");
    check(n_reset > 0, "filter_reset never exercised");
    check(n_tap_change > 0 && n_tap_reject > 0 && n_short_taps > 0, "tap count changes");
    check(n_step_change > 0, "step size never changed");
    check(n_converged > 0, "adaptation never converged");
    check(n_snap_ok > 0, "snapshots never read");
    $display("mechanisms: gated=%0d irq=%0d polled=%0d busy=%0d bypass=%0d reset=%0d taps=%0d/%0d/%0d step=%0d",
             n_gated, n_irq, n_polled, n_busy_ok, n_bypass, n_reset, n_tap_change,
             n_tap_reject, n_short_taps, n_step_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
