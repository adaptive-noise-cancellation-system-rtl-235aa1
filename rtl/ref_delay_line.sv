// ref_delay_line: the reference tapped delay line of the LMS filter. It keeps
// the DEPTH most recent reference samples x[n], x[n-1], ..., x[n-DEPTH+1] in
// registers. When shift_en is high (the sample_valid strobe) every word moves
// one place and din enters at position 0. tap selects one word for the
// filter's multiplier; tap_data is combinational from the registers, so it is
// valid in the same clock (position 0 is the newest sample). Depth 64 x 16
// bits and the register implementation follow the specification; the
// specification speaks of both a circular buffer and shifting, and this
// design shifts, which makes position k equal to x[n-k] directly.
module ref_delay_line #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    tap,
  output logic [WIDTH-1:0] tap_data
);

  logic [WIDTH-1:0] line [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) line[i] <= '0;
    end else if (shift_en) begin
      line[0] <= din;
      for (int i = 1; i < int'(DEPTH); i++) line[i] <= line[i-1];
    end
  end

  assign tap_data = line[tap];

endmodule
