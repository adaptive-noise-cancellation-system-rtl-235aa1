// tb_coeff_ram: self-checking test of the dual-port coefficient memory
// (64 x 24). Writes random words through port B while reading through port A,
// and compares every read, one clock after its address, with a shadow array.
// Reads of the address being written return the old word.
module tb_coeff_ram;
  logic        clk = 1'b0;
  logic [5:0]  addr_a = '0, addr_b = '0;
  logic [23:0] q_a, d_b = '0;
  logic        we_b = 1'b0;
  logic [23:0] shadow [64];
  logic [23:0] exp_q;
  int checks = 0, failures = 0;

  coeff_ram dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we_b = 1'b1; addr_b = 6'(i); d_b = 24'($urandom); shadow[i] = d_b;
    end
    @(negedge clk);
    we_b = 1'b0;
    // random mixed traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr_a = 6'($urandom);
      exp_q  = shadow[addr_a];
      we_b   = 1'($urandom);
      addr_b = ($urandom_range(3, 0) == 0) ? addr_a : 6'($urandom);
      d_b    = 24'($urandom);
      @(posedge clk);
      if (we_b) shadow[addr_b] = d_b;
      #1;
      checks++;
      if (q_a !== exp_q) begin
        failures++;
        $display("read %0d: %h expected %h", addr_a, q_a, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
