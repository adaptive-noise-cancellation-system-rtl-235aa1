// lms_filter: sample-serial LMS adaptive FIR filter that removes from the
// microphone signal d[n] the part correlated with the reference noise x[n]:
//   y[n]   = sum_{k<L} w[k] * x[n-k]
//   e[n]   = d[n] - y[n]                       (the output, audio_out)
//   w[k]  += mu * e[n] * x[n-k]                for k < L
// L is tap_count (1..N) and mu is step_size. Both, like the inputs, are
// captured on sample_valid and hold for that sample.
//
// How it works: one signed multiplier (one DSP block) serves the whole
// computation under a four-state controller:
//   IDLE    wait for sample_valid; the new x[n] enters the delay line
//   PREDICT L clocks, one product w[k]*x[n-k] accumulated per clock
//   SUB     1 clock: e = sat(d - y); the multiplier forms mu*e
//   UPDATE  L clocks, one weight read, updated and written back per clock
// so a sample takes 2L+1 clocks (129 at L = 64, against about 1,041 clocks
// between 48 kHz samples at 50 MHz). Weights live in coeff_ram (port A reads
// w[k+1] while w[k] is being used, port B writes the new w[k]); the address 0
// read issued while idle and during SUB makes w[0] ready at the first
// PREDICT and UPDATE clock. The reference samples live in ref_delay_line.
//
// Number formats: samples Q1.15, mu unsigned Q0.16, weights Q2.22 (range
// -2..2), accumulator 46 bits (no overflow for 64 taps), mu*e kept as Q2.16.
// Products are truncated (arithmetic shift); e and the weights saturate.
//
// filter_reset (one-clock pulse) zeroes all weights in one clock: a register
// of per-word "written" flags is cleared, and a weight whose flag is clear
// reads as zero until it is written again. It also abandons a sample in
// progress (audio_out keeps its last value). With bypass high, a sample
// passes d[n] straight to audio_out and the controller stays in IDLE; the
// delay line still shifts, so it is current when bypass is released.
//
// Outputs: audio_out is registered, changes at the end of SUB (or on
// sample_valid in bypass) and holds until the next one. busy is high from the
// first PREDICT clock to the last UPDATE clock (SUB included).
// From the specification: the equations, the FSM states, one multiplier,
// 2N+1 clocks, the memory sizes, the port list and the bypass/reset/tap/step
// semantics. This design's choices: the number formats, truncation and
// saturation, the flag-based clear, and the behaviour in bypass and reset.
module lms_filter
  import nc_pkg::*;
#(
  parameter int N           = 64,  // maximum taps
  parameter int DATA_WIDTH  = 16,
  parameter int COEFF_WIDTH = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DATA_WIDTH-1:0] mic_in,       // d[n]
  input  logic [DATA_WIDTH-1:0] ref_in,       // x[n]
  input  logic                  sample_valid,
  input  logic [15:0]           step_size,    // mu, Q0.16
  input  logic [7:0]            tap_count,    // active taps 1..N
  input  logic                  bypass,
  input  logic                  filter_reset,
  output logic [DATA_WIDTH-1:0] audio_out,    // e[n]
  output logic                  busy
);

  localparam int AW     = $clog2(N);
  localparam int CF     = COEFF_WIDTH - 2;                // weight fraction bits
  localparam int DF     = DATA_WIDTH - 1;                 // sample fraction bits
  localparam int MB_W   = DATA_WIDTH + 1;                 // multiplier B width
  localparam int PROD_W = COEFF_WIDTH + MB_W;
  localparam int ACC_W  = COEFF_WIDTH + DATA_WIDTH + AW;
  localparam int MUE_SH = DF;                             // mu*e to Q2.16
  localparam int DW_SH  = 16 + DF - CF;                   // mu*e*x to weight scale

  lms_state_t state;
  logic [AW-1:0]                  k;
  logic [AW-1:0]                  last_k;
  logic signed [DATA_WIDTH-1:0]   d_reg;
  logic [15:0]                    mu_reg;
  logic signed [ACC_W-1:0]        acc;
  logic signed [DATA_WIDTH+1:0]   mu_e;
  logic [N-1:0]                   written;
  logic                           written_q;

  // ---------------- storage ----------------
  logic [AW-1:0]          raddr;
  logic [COEFF_WIDTH-1:0] ram_q;
  logic                   ram_we;
  logic [COEFF_WIDTH-1:0] ram_d;
  logic [DATA_WIDTH-1:0]  x_k;

  coeff_ram #(.DEPTH(N), .WIDTH(COEFF_WIDTH)) u_coeff (
    .clk    (clk),
    .addr_a (raddr),
    .q_a    (ram_q),
    .we_b   (ram_we),
    .addr_b (k),
    .d_b    (ram_d)
  );

  ref_delay_line #(.DEPTH(N), .WIDTH(DATA_WIDTH)) u_dline (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (sample_valid),
    .din      (ref_in),
    .tap      (k),
    .tap_data (x_k)
  );

  // ---------------- datapath ----------------
  logic signed [COEFF_WIDTH-1:0] w_k;
  logic signed [COEFF_WIDTH-1:0] mul_a;
  logic signed [MB_W-1:0]        mul_b;
  logic signed [PROD_W-1:0]      prod;
  logic signed [ACC_W-1:0]       e_wide;
  logic signed [DATA_WIDTH-1:0]  e_sat;
  logic signed [COEFF_WIDTH+1:0] w_sum;
  logic signed [COEFF_WIDTH-1:0] w_new;

  localparam logic signed [DATA_WIDTH-1:0] D_MAX = {1'b0, {(DATA_WIDTH-1){1'b1}}};
  localparam logic signed [DATA_WIDTH-1:0] D_MIN = {1'b1, {(DATA_WIDTH-1){1'b0}}};
  localparam logic signed [COEFF_WIDTH-1:0] W_MAX = {1'b0, {(COEFF_WIDTH-1){1'b1}}};
  localparam logic signed [COEFF_WIDTH-1:0] W_MIN = {1'b1, {(COEFF_WIDTH-1){1'b0}}};


  always_comb begin
    w_k = written_q ? signed'(ram_q) : '0;

    // y has the sample scale after dropping the weight fraction bits.
    e_wide = ACC_W'(d_reg) - (acc >>> CF);
    if (e_wide > ACC_W'(D_MAX))      e_sat = D_MAX;
    else if (e_wide < ACC_W'(D_MIN)) e_sat = D_MIN;
    else                             e_sat = e_wide[DATA_WIDTH-1:0];

    // Shared multiplier operand selection.
    unique case (state)
      LMS_SUB: begin
        mul_a = COEFF_WIDTH'(e_sat);
        mul_b = signed'({1'b0, mu_reg});
      end
      LMS_UPDATE: begin
        mul_a = COEFF_WIDTH'(mu_e);
        mul_b = MB_W'(signed'(x_k));
      end
      default: begin  // PREDICT (and don't-care in IDLE)
        mul_a = w_k;
        mul_b = MB_W'(signed'(x_k));
      end
    endcase
    prod = mul_a * mul_b;

    w_sum = (COEFF_WIDTH+2)'(w_k) + (COEFF_WIDTH+2)'(prod >>> DW_SH);
    if (w_sum > (COEFF_WIDTH+2)'(W_MAX))      w_new = W_MAX;
    else if (w_sum < (COEFF_WIDTH+2)'(W_MIN)) w_new = W_MIN;
    else                                      w_new = w_sum[COEFF_WIDTH-1:0];

    ram_we = (state == LMS_UPDATE) && !filter_reset;
    ram_d  = w_new;

    // Read one word ahead; address 0 whenever the next clock starts a pass.
    if ((state == LMS_PREDICT || state == LMS_UPDATE) && k != last_k)
      raddr = k + 1'b1;
    else
      raddr = '0;
  end

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= LMS_IDLE;
      k         <= '0;
      last_k    <= '0;
      d_reg     <= '0;
      mu_reg    <= '0;
      acc       <= '0;
      mu_e      <= '0;
      written   <= '0;
      written_q <= 1'b0;
      audio_out <= '0;
    end else if (filter_reset) begin
      written   <= '0;
      written_q <= 1'b0;
      state     <= LMS_IDLE;
      k         <= '0;
    end else begin
      written_q <= written[raddr];
      unique case (state)
        LMS_IDLE: begin
          k <= '0;
          if (sample_valid) begin
            d_reg  <= signed'(mic_in);
            mu_reg <= step_size;
            acc    <= '0;
            if (tap_count == 8'd0)             last_k <= '0;
            else if (int'(tap_count) > N)      last_k <= AW'(N - 1);
            else                               last_k <= AW'(tap_count - 8'd1);
            if (bypass) audio_out <= mic_in;
            else        state     <= LMS_PREDICT;
          end
        end
        LMS_PREDICT: begin
          acc <= acc + ACC_W'(prod);
          if (k == last_k) begin
            state <= LMS_SUB;
            k     <= '0;
          end else begin
            k <= k + 1'b1;
          end
        end
        LMS_SUB: begin
          audio_out <= e_sat;
          mu_e      <= (DATA_WIDTH+2)'(prod >>> MUE_SH);
          state     <= LMS_UPDATE;
        end
        LMS_UPDATE: begin
          written[k] <= 1'b1;
          if (k == last_k) begin
            state <= LMS_IDLE;
            k     <= '0;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= LMS_IDLE;
      endcase
    end
  end

  assign busy = (state != LMS_IDLE);

endmodule
