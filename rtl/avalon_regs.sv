// avalon_regs: Avalon-MM slave register file through which the HPS controls
// the noise canceller. Eight 32-bit registers at word addresses 0..7 (byte
// offsets 0x00..0x1C); the other 24 word addresses read as zero and ignore
// writes, as do unused bits.
//   0 STATUS     [0] sample_ready: set on sample_valid, write 1 to clear
//                [1] filter_busy: live copy of the filter's busy (read only)
//   1 CONTROL    [0] bypass; [1] filter_reset: a write of 1 gives a one-clock
//                pulse, the bit always reads 0
//   2 STEP_SIZE  [15:0] mu, Q0.16, reset 0x0100
//   3 TAP_COUNT  [7:0] taps, reset 32; writes outside 1..64 are ignored
//   4 MIC_SAMPLE [15:0] d[n] snapshot  } latched together on sample_valid,
//   5 REF_SAMPLE [15:0] x[n] snapshot  } read only
//   6 OUT_SAMPLE [15:0] e snapshot     }
//   7 IRQ_ENABLE [0] irq_en, reset 0
// readdata[31:16] is therefore always zero, as no register has bits there.
// Timing: zero wait states. readdata is combinational from address, so it is
// valid in the cycle read is asserted; reading has no side effects. A write
// takes effect at the next clock edge. irq is a level: sample_ready AND
// irq_en. If the hardware sets sample_ready in the clock the HPS clears it,
// the new sample wins.
// All of this follows the specification except the set-wins rule, the
// sign-free (zero-extended) snapshot read-back and OUT_SAMPLE holding the
// filter output present at the strobe, i.e. that of the previous sample,
// since the specification latches all three snapshots on the same pulse.
module avalon_regs
  import nc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave port
  input  logic [4:0]  address,      // word address
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        irq,
  // Hardware connections
  input  logic [15:0] mic_sample,
  input  logic [15:0] ref_sample,
  input  logic [15:0] out_sample,
  input  logic        sample_valid,
  input  logic        busy,
  output logic [15:0] step_size,
  output logic [7:0]  tap_count,
  output logic        bypass,
  output logic        filter_reset  // one-clock pulse
);

  logic        sample_ready;
  logic        irq_en;
  logic [15:0] mic_snap, ref_snap, out_snap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_ready <= 1'b0;
      irq_en       <= 1'b0;
      bypass       <= 1'b0;
      filter_reset <= 1'b0;
      step_size    <= STEP_SIZE_DEFAULT;
      tap_count    <= TAP_COUNT_DEFAULT;
      mic_snap     <= '0;
      ref_snap     <= '0;
      out_snap     <= '0;
    end else begin
      filter_reset <= 1'b0;
      if (write) begin
        unique case (address)
          REG_STATUS:
            if (writedata[STAT_SAMPLE_RDY]) sample_ready <= 1'b0;
          REG_CONTROL: begin
            bypass       <= writedata[CTRL_BYPASS];
            filter_reset <= writedata[CTRL_RESET];
          end
          REG_STEP_SIZE: step_size <= writedata[15:0];
          REG_TAP_COUNT:
            if (writedata[7:0] >= TAP_COUNT_MIN && writedata[7:0] <= TAP_COUNT_MAX)
              tap_count <= writedata[7:0];
          REG_IRQ_ENABLE: irq_en <= writedata[0];
          default: ;  // read-only or unused addresses
        endcase
      end
      if (sample_valid) begin
        sample_ready <= 1'b1;
        mic_snap     <= mic_sample;
        ref_snap     <= ref_sample;
        out_snap     <= out_sample;
      end
    end
  end

  always_comb begin
    readdata = '0;
    unique case (address)
      REG_STATUS: begin
        readdata[STAT_SAMPLE_RDY] = sample_ready;
        readdata[STAT_BUSY]       = busy;
      end
      REG_CONTROL:    readdata[CTRL_BYPASS] = bypass;
      REG_STEP_SIZE:  readdata[15:0] = step_size;
      REG_TAP_COUNT:  readdata[7:0]  = tap_count;
      REG_MIC_SAMPLE: readdata[15:0] = mic_snap;
      REG_REF_SAMPLE: readdata[15:0] = ref_snap;
      REG_OUT_SAMPLE: readdata[15:0] = out_snap;
      REG_IRQ_ENABLE: readdata[0]    = irq_en;
      default: ;
    endcase
  end

  assign irq = sample_ready & irq_en;

  // A read and a write are never issued together on this slave.
  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(read && write));

endmodule
