// tb_ref_delay_line: self-checking test of the 64 x 16 reference delay line.
// After reset every tap reads zero. Random samples are shifted in with random
// gaps; after each shift every tap k is compared with x[n-k] from a
// software history, and taps must not move while shift_en is low.
module tb_ref_delay_line;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        shift_en = 1'b0;
  logic [15:0] din = '0;
  logic [5:0]  tap = '0;
  logic [15:0] tap_data;
  logic [15:0] hist [64];
  int checks = 0, failures = 0;

  ref_delay_line dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < 64; k++) begin
      tap = 6'(k);
      #1;
      checks++;
      if (tap_data !== hist[k]) begin
        failures++;
        $display("tap %0d: %h expected %h", k, tap_data, hist[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 64; k++) hist[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      din = 16'($urandom); shift_en = 1'b1;
      @(negedge clk);
      shift_en = 1'b0;
      for (int k = 63; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      din = 16'($urandom);
      repeat ($urandom_range(3, 0)) @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
