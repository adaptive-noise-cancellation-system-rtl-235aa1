// tb_lms_filter: self-checking test of lms_filter at its default size
// (64 taps, 16-bit samples, 24-bit weights). A bit-exact reference model of
// the LMS recursion (64-bit integer arithmetic, same formats, truncation and
// saturation) runs beside the filter. For every sample the test checks
// audio_out against the model, that busy lasts exactly 2L+1 clocks and that
// audio_out is updated at the end of SUB (L+1 clocks after the first busy
// clock). It covers random data with several tap counts and step sizes, a
// plant the filter must learn (the error energy must fall), bypass,
// filter_reset and step size zero.
module tb_lms_filter;
  localparam int N = 64;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] mic_in = '0, ref_in = '0;
  logic        sample_valid = 1'b0;
  logic [15:0] step_size = 16'h0100;
  logic [7:0]  tap_count = 8'd32;
  logic        bypass = 1'b0, filter_reset = 1'b0;
  logic [15:0] audio_out;
  logic        busy;

  int checks = 0, failures = 0;

  lms_filter dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  longint w_m [N];
  longint x_m [N];

  function automatic longint sat(longint v, int bits);
    longint hi = (longint'(1) <<< (bits - 1)) - 1;
    longint lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint model_step(longint d, longint x, logic [15:0] mu,
                                        int L, bit byp);
    longint acc = 0, e, mue;
    for (int i = N - 1; i > 0; i--) x_m[i] = x_m[i-1];
    x_m[0] = x;
    if (byp) return d;
    for (int k = 0; k < L; k++) acc += w_m[k] * x_m[k];
    e   = sat(d - (acc >>> 22), 16);
    mue = (e * longint'(mu)) >>> 15;
    for (int k = 0; k < L; k++) w_m[k] = sat(w_m[k] + ((mue * x_m[k]) >>> 9), 24);
    return e;
  endfunction

  // ---------------- stimulus ----------------
  task automatic run_sample(logic signed [15:0] d, logic signed [15:0] x,
                            logic [15:0] mu, int L, bit byp, output longint e_out);
    longint exp_e;
    int busy_cycles, out_cycle, cyc;
    logic [15:0] prev_out;
    exp_e = model_step(longint'(d), longint'(x), mu, L, byp);
    @(negedge clk);
    mic_in = d; ref_in = x; step_size = mu; tap_count = 8'(L); bypass = byp;
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    mic_in = 16'($urandom); ref_in = 16'($urandom); step_size = 16'($urandom); tap_count = 8'($urandom);
    if (byp) begin
      checks++;
      if (busy || audio_out !== d) begin
        failures++;
        $display("bypass: busy=%0b out=%h exp=%h", busy, audio_out, d);
      end
    end else begin
      busy_cycles = 0; out_cycle = -1; cyc = 0; prev_out = audio_out;
      while (busy) begin
        @(negedge clk);
        busy_cycles++;
        cyc++;
        if (out_cycle < 0 && audio_out !== prev_out) out_cycle = cyc;
      end
      checks++;
      if (busy_cycles != 2 * L + 1) begin
        failures++;
        $display("busy lasted %0d clocks, expected %0d", busy_cycles, 2 * L + 1);
      end
      checks++;
      if (audio_out !== 16'(exp_e)) begin
        failures++;
        $display("L=%0d mu=%h d=%h x=%h: out=%h exp=%h", L, mu, d, x, audio_out, 16'(exp_e));
      end
      if (out_cycle >= 0) begin
        checks++;
        if (out_cycle != L + 1) begin
          failures++;
          $display("audio_out changed %0d clocks after the first busy clock, expected %0d",
                   out_cycle, L + 1);
        end
      end
    end
    bypass = 1'b0;
    e_out = exp_e;
    repeat ($urandom_range(3, 0)) @(negedge clk);
  endtask

  task automatic do_reset_pulse();
    @(negedge clk);
    filter_reset = 1'b1;
    @(negedge clk);
    filter_reset = 1'b0;
    for (int k = 0; k < N; k++) w_m[k] = 0;
  endtask

  longint e, e_early, e_late;
  logic signed [15:0] xs [4];
  logic signed [15:0] xr, dr;

  initial begin
    for (int k = 0; k < N; k++) begin w_m[k] = 0; x_m[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. random data, random tap counts and step sizes (weights may saturate)
    for (int s = 0; s < 300; s++)
      run_sample(16'($urandom), 16'($urandom), 16'($urandom_range(16'h2000, 0)),
                 $urandom_range(N, 1), 1'b0, e);

    // 2. full length, extreme step size, one-tap filter
    for (int s = 0; s < 40; s++) run_sample(16'($urandom), 16'($urandom), 16'hFFFF, N, 1'b0, e);
    for (int s = 0; s < 40; s++) run_sample(16'($urandom), 16'($urandom), 16'h4000, 1, 1'b0, e);

    // 3. bypass samples interleaved with filtered ones
    for (int s = 0; s < 20; s++)
      run_sample(16'($urandom), 16'($urandom), 16'h0100, 32, s[0], e);

    // 4. filter_reset: all weights zero, so e = d for the next sample
    do_reset_pulse();
    run_sample(16'sh1234, 16'sh4000, 16'h0000, N, 1'b0, e);
    checks++;
    if (audio_out !== 16'h1234) begin
      failures++;
      $display("after filter_reset out=%h, expected 1234", audio_out);
    end

    // 5. learn d[n] = 0.5 x[n-2] - 0.25 x[n-5]; error energy must fall
    for (int i = 0; i < 4; i++) xs[i] = 0;
    e_early = 0; e_late = 0;
    begin
      logic signed [15:0] hist [6];
      for (int i = 0; i < 6; i++) hist[i] = 0;
      for (int s = 0; s < 1500; s++) begin
        xr = 16'($signed(16'($urandom)) >>> 1);
        for (int i = 5; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = xr;
        dr = 16'((longint'(hist[2]) >>> 1) - (longint'(hist[5]) >>> 2));
        run_sample(dr, xr, 16'h2000, 16, 1'b0, e);
        if (s < 100) e_early += e * e;
        if (s >= 1400) e_late += e * e;
      end
    end
    checks++;
    if (e_late * 100 > e_early) begin
      failures++;
      $display("no convergence: early energy %0d, late energy %0d", e_early, e_late);
    end else begin
      $display("error energy fell from %0d to %0d", e_early, e_late);
    end

    // 6. filter_reset while a sample is being computed aborts it
    @(negedge clk);
    mic_in = 16'h0100; ref_in = 16'h0200; sample_valid = 1'b1;
    void'(model_step(longint'(16'sh0100), longint'(16'sh0200), 0, N, 1'b1)); // delay line only
    @(negedge clk);
    sample_valid = 1'b0;
    repeat (5) @(negedge clk);
    filter_reset = 1'b1;
    @(negedge clk);
    filter_reset = 1'b0;
    for (int k = 0; k < N; k++) w_m[k] = 0;
    checks++;
    if (busy) begin
      failures++;
      $display("busy still high after filter_reset");
    end
    run_sample(16'sh0777, 16'sh0100, 16'h0100, N, 1'b0, e);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
