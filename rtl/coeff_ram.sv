// coeff_ram: simple dual-port memory for the LMS filter weights w[k],
// 64 words of 24 bits by default, written so that FPGA tools map it to one
// block RAM (M10K). Port A is a synchronous read port (data one clock after
// the address); port B is a write port. The LMS filter reads through port A
// during PREDICT and UPDATE and writes the updated weight through port B
// during UPDATE. A read and a write of the same address in one clock return
// the old word. Depth, width and the port roles follow the specification.
// The memory has no reset: the filter masks unwritten words (see lms_filter).
module coeff_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // Port A: read
  input  logic [AW-1:0]    addr_a,
  output logic [WIDTH-1:0] q_a,
  // Port B: write
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] d_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= d_b;
  end

endmodule
