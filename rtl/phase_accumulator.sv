// phase_accumulator: DDS phase accumulator.
//
// On every cycle with en high the ACC_W-bit phase advances by the FTW_W-bit
// tuning word (zero-extended), wrapping modulo 2**ACC_W, so the output
// frequency is ftw * f_en / 2**ACC_W. wrap pulses for one cycle, together
// with the updated phase, when the addition overflows, i.e. when a waveform
// period has been completed. The 49-bit accumulator and 48-bit tuning word are
// the widths of the original implementation; since ftw < 2**(ACC_W-1), at most
// one wrap can happen per step and the output stays below half the rate of en.
//
// Interface: clear restarts the phase at 0 (synchronous). Timing: phase and
// wrap are registered, one cycle after en.
module phase_accumulator #(
  parameter int unsigned ACC_W = 49,
  parameter int unsigned FTW_W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [FTW_W-1:0] ftw,
  output logic [ACC_W-1:0] phase,
  output logic             wrap
);

  logic [ACC_W:0] sum;

  always_comb sum = {1'b0, phase} + (ACC_W+1)'(ftw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else if (clear) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else begin
      wrap <= en & sum[ACC_W];
      if (en) phase <= sum[ACC_W-1:0];
    end
  end

endmodule
