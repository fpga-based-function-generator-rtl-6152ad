// sample_clock: sample clock for the DAC and the waveform engine.
//
// The DAC takes one point of the stored period on each rising edge of the
// sample clock, so the sample clock sets the frequency accuracy. Here it is a
// clock enable derived from the system clock: dac_tick pulses once every
// DAC_DIV cycles, and engine_tick pulses with every INTERP-th dac_tick (the
// engine runs at the rate before interpolation). Both counters restart on
// reset, so the first ticks coincide. Division ratios are this
// implementation's (50 MHz / 100 = 500 kHz DAC rate, 250 kHz engine rate).
//
// Timing: ticks are single-cycle pulses; the first comes DAC_DIV cycles after
// reset is released.
module sample_clock #(
  parameter int unsigned DAC_DIV = 100,
  parameter int unsigned INTERP  = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic dac_tick,
  output logic engine_tick
);

  localparam int unsigned DW = (DAC_DIV > 1) ? $clog2(DAC_DIV) : 1;
  localparam int unsigned IW = (INTERP > 1) ? $clog2(INTERP) : 1;

  logic [DW-1:0] div_cnt;
  logic [IW-1:0] int_cnt;
  logic          wrap_div;

  always_comb wrap_div = (div_cnt == DW'(DAC_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      int_cnt     <= '0;
      dac_tick    <= 1'b0;
      engine_tick <= 1'b0;
    end else begin
      div_cnt     <= wrap_div ? '0 : div_cnt + 1'b1;
      dac_tick    <= wrap_div;
      engine_tick <= wrap_div && (int_cnt == '0);
      if (wrap_div) int_cnt <= (int_cnt == IW'(INTERP - 1)) ? '0 : int_cnt + 1'b1;
    end
  end

endmodule
