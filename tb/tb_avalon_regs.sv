// tb_avalon_regs: self-checking test of the Avalon-MM register file. It
// checks reset values, read-back of every register at zero wait states,
// unused addresses and bits reading 0, TAP_COUNT ignoring writes outside
// 1..64, the one-clock self-clearing filter_reset pulse, STATUS[0] set by
// sample_valid and cleared by writing 1 (set wins when both happen in one
// clock), STATUS[1] following busy, the three snapshots latched together on
// sample_valid, read-only registers ignoring writes, and the level IRQ
// (sample_ready AND IRQ_ENABLE[0]).
module tb_avalon_regs;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [4:0]  address = '0;
  logic        read = 1'b0, write = 1'b0;
  logic [31:0] writedata = '0;
  logic [31:0] readdata;
  logic        irq;
  logic [15:0] mic_sample = '0, ref_sample = '0, out_sample = '0;
  logic        sample_valid = 1'b0, busy = 1'b0;
  logic [15:0] step_size;
  logic [7:0]  tap_count;
  logic        bypass, filter_reset;
  int checks = 0, failures = 0;

  avalon_regs dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0; writedata = $urandom;
  endtask

  // Zero wait states: data is checked in the same clock the read is issued.
  task automatic rd_check(input logic [4:0] a, input logic [31:0] exp, input string what);
    @(negedge clk);
    address = a; read = 1'b1;
    #1;
    checks++;
    if (readdata !== exp) begin
      failures++;
      $display("%s: read %h expected %h", what, readdata, exp);
    end
    @(negedge clk);
    read = 1'b0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAILED: %s", what);
    end
  endtask

  task automatic pulse_sample(input logic [15:0] m, r, o);
    @(negedge clk);
    mic_sample = m; ref_sample = r; out_sample = o; sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    mic_sample = 16'($urandom); ref_sample = 16'($urandom); out_sample = 16'($urandom);
  endtask

  int reset_pulses = 0;
  always @(posedge clk) if (rst_n && filter_reset) reset_pulses++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // reset values
    rd_check(5'd0, 32'h0, "STATUS reset");
    rd_check(5'd1, 32'h0, "CONTROL reset");
    rd_check(5'd2, 32'h0000_0100, "STEP_SIZE reset");
    rd_check(5'd3, 32'd32, "TAP_COUNT reset");
    rd_check(5'd7, 32'h0, "IRQ_ENABLE reset");
    check(step_size == 16'h0100 && tap_count == 8'd32 && !bypass && !filter_reset && !irq,
          "reset outputs");

    // STEP_SIZE: only bits 15:0 kept
    wr(5'd2, 32'hDEAD_BEEF);
    rd_check(5'd2, 32'h0000_BEEF, "STEP_SIZE write");
    check(step_size == 16'hBEEF, "step_size output");

    // TAP_COUNT range
    wr(5'd3, 32'd64);  rd_check(5'd3, 32'd64, "TAP_COUNT 64");
    wr(5'd3, 32'd1);   rd_check(5'd3, 32'd1, "TAP_COUNT 1");
    wr(5'd3, 32'd0);   rd_check(5'd3, 32'd1, "TAP_COUNT 0 ignored");
    wr(5'd3, 32'd65);  rd_check(5'd3, 32'd1, "TAP_COUNT 65 ignored");
    wr(5'd3, 32'd200); rd_check(5'd3, 32'd1, "TAP_COUNT 200 ignored");
    wr(5'd3, 32'h0000_0110); rd_check(5'd3, 32'd16, "TAP_COUNT upper bits ignored");
    check(tap_count == 8'd16, "tap_count output");

    // CONTROL: bypass and the self-clearing reset pulse
    wr(5'd1, 32'h1);
    rd_check(5'd1, 32'h1, "bypass set");
    check(bypass, "bypass output");
    wr(5'd1, 32'h3);
    rd_check(5'd1, 32'h1, "filter_reset reads 0");
    check(reset_pulses == 1, "one filter_reset pulse of one clock");
    wr(5'd1, 32'h0);
    check(!bypass && reset_pulses == 1, "bypass cleared, no extra pulse");

    // STATUS[1] follows busy; writes to it do nothing
    busy = 1'b1;
    rd_check(5'd0, 32'h2, "busy visible");
    wr(5'd0, 32'h2);
    rd_check(5'd0, 32'h2, "busy not writable");
    busy = 1'b0;
    rd_check(5'd0, 32'h0, "busy cleared");

    // snapshots and sample_ready
    pulse_sample(16'h1234, 16'hABCD, 16'h8001);
    rd_check(5'd0, 32'h1, "sample_ready set");
    rd_check(5'd4, 32'h1234, "MIC_SAMPLE");
    rd_check(5'd5, 32'hABCD, "REF_SAMPLE");
    rd_check(5'd6, 32'h8001, "OUT_SAMPLE");
    wr(5'd4, 32'h5555); wr(5'd5, 32'h5555); wr(5'd6, 32'h5555);
    rd_check(5'd4, 32'h1234, "MIC_SAMPLE read only");
    rd_check(5'd5, 32'hABCD, "REF_SAMPLE read only");
    rd_check(5'd6, 32'h8001, "OUT_SAMPLE read only");
    check(!irq, "no irq while disabled");

    // IRQ
    wr(5'd7, 32'hFFFF_FFFF);
    rd_check(5'd7, 32'h1, "IRQ_ENABLE");
    check(irq, "irq with sample_ready and irq_en");
    wr(5'd0, 32'h0);
    check(irq, "writing 0 leaves sample_ready");
    wr(5'd0, 32'h1);
    check(!irq, "irq cleared by writing 1 to STATUS[0]");
    rd_check(5'd0, 32'h0, "sample_ready cleared");

    // set wins over clear in the same clock
    pulse_sample(16'h0001, 16'h0002, 16'h0003);
    @(negedge clk);
    address = 5'd0; writedata = 32'h1; write = 1'b1; sample_valid = 1'b1;
    mic_sample = 16'h0A0A;
    @(negedge clk);
    write = 1'b0; sample_valid = 1'b0;
    check(irq, "sample_ready set wins over clear");
    rd_check(5'd4, 32'h0A0A, "snapshot on second sample");
    wr(5'd7, 32'h0);
    check(!irq, "irq disabled");

    // unused addresses read zero and ignore writes
    for (int a = 8; a < 32; a++) begin
      wr(5'(a), 32'hFFFF_FFFF);
      rd_check(5'(a), 32'h0, "unused address");
    end
    rd_check(5'd2, 32'h0000_BEEF, "STEP_SIZE unchanged by unused writes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
