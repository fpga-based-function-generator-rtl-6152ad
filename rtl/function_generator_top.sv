// function_generator_top: FPGA function generator.
//
// Signal chain, in the order of the block diagram:
//   onboard memory + waveform engine -> digital gain -> digital
//   (interpolation) filter -> DAC interface, paced by the sample clock.
// The engine produces sine, square, triangle and ramp samples in parallel
// from DDS phase accumulators at ENGINE_HZ = CLK_HZ / (DIV * 2**LOG2_L);
// the waveform that goes on is chosen by the switches (manual mode) or by the
// sequencer (sequence and script modes). The gain scales the amplitude, the
// filter interpolates to the DAC rate CLK_HZ / DIV, and each filtered
// sample is shifted out to the off-chip DAC, whose analog output and analog
// filter are outside this design (their connection is the SPI port). The
// rotary knob steps the frequency in decades from 0.1 Hz to 100 kHz, and its
// push button toggles the output on and off (off sends mid-scale).
//
// Reset: rst_b, active low, asynchronous assertion; the sample clock, engine
// and DAC interface all restart together.
//
// The block diagram, the 8-bit samples, the 0.1 Hz to 100 kHz range, the
// three 49-bit accumulators and the knob and switch controls follow the
// original design; the rates, the gain format, the interpolator, the DAC word and
// the sequencer's instruction format are this design's own.
//
// Timing: one engine sample every DIV * 2**LOG2_L cycles (200 by default); a
// DAC word starts (dac_start) the cycle after every DAC tick and takes 50
// cycles, so DIV must be at least 50. Parameters: DIV (clocks per DAC word),
// LOG2_L (interpolation factor 2**LOG2_L), DEBOUNCE (push-button debounce in
// cycles), SEQ_DEPTH (sequence instructions).
module function_generator_top
  import fg_pkg::*;
#(
  parameter int unsigned DIV       = fg_pkg::DAC_DIV,
  parameter int unsigned LOG2_L    = $clog2(fg_pkg::INTERP),
  parameter int unsigned DEBOUNCE  = 50_000,
  parameter int unsigned SEQ_DEPTH = 8,
  localparam int unsigned SEQ_AW   = $clog2(SEQ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_b,
  // front panel
  input  logic              rot_a,
  input  logic              rot_b,
  input  logic              rot_center,
  input  wave_t             sw_wave,     // waveform in manual mode
  input  mode_t             sw_mode,
  input  logic              trigger,     // script-mode trigger, one pulse per step
  input  logic [7:0]        gain,        // amplitude, 64 = unity
  // sequence instruction load port
  input  logic              seq_we,
  input  logic [SEQ_AW-1:0] seq_waddr,
  input  seq_entry_t        seq_wdata,
  input  logic [SEQ_AW:0]   seq_len,
  // serial DAC
  output logic              spi_sck,
  output logic              spi_mosi,
  output logic              dac_cs_n,
  output logic              dac_clr_n,
  // status
  output logic [FREQ_IDX_W-1:0] freq_idx,
  output logic              output_en,
  output wave_t             wave_sel,
  output sample_t           dac_sample,  // sample sent on the last DAC word
  output logic              dac_start,   // a DAC word starts
  output logic              dac_done,    // a DAC word has been latched
  output logic              clipped,     // gain stage saturated
  output logic [SEQ_AW-1:0] seq_index,   // current sequence instruction
  output logic              seq_advance, // the sequence moved on
  // all four engine channels, before gain and filtering
  output sample_t           sine,
  output sample_t           square,
  output sample_t           triangle,
  output sample_t           ramp,
  output logic              sample_new   // new sample on every channel
);

  localparam int unsigned L_FACTOR  = 2 ** LOG2_L;
  localparam int unsigned ENGINE_HZ = CLK_HZ / (DIV * L_FACTOR);

  logic    rst_n;
  logic    dac_tick, engine_tick;
  logic    turn_up, turn_down, press;
  ftw_t    ftw;
  sample_t eng_sample, gain_sample, filt_sample;
  logic    eng_valid, eng_wrap, gain_valid, filt_valid;
  logic    dac_busy;

  assign rst_n      = rst_b;
  assign sample_new = eng_valid;

  sample_clock #(.DAC_DIV(DIV), .INTERP(L_FACTOR)) u_clock (
    .clk, .rst_n, .dac_tick, .engine_tick);

  rotary_encoder #(.DEBOUNCE(DEBOUNCE)) u_knob (
    .clk, .rst_n, .rot_a, .rot_b, .rot_center, .turn_up, .turn_down, .press);

  frequency_control #(.ENGINE_HZ(ENGINE_HZ)) u_freq (
    .clk, .rst_n, .turn_up, .turn_down, .press, .freq_idx, .ftw, .output_en);

  waveform_sequencer #(.DEPTH(SEQ_DEPTH)) u_seq (
    .clk, .rst_n, .mode(sw_mode), .manual_wave(sw_wave), .period_wrap(eng_wrap),
    .trigger, .seq_len, .we(seq_we), .waddr(seq_waddr), .wdata(seq_wdata),
    .wave_sel, .index(seq_index), .advance(seq_advance));

  waveform_engine u_engine (
    .clk, .rst_n, .clear(1'b0), .tick(engine_tick), .ftw, .wave_sel,
    .sine, .square, .triangle, .ramp,
    .sample(eng_sample), .sample_valid(eng_valid), .wrap(eng_wrap));

  digital_gain #(.W(SAMPLE_W)) u_gain (
    .clk, .rst_n, .in_valid(eng_valid), .in_sample(eng_sample), .gain,
    .out_valid(gain_valid), .out_sample(gain_sample), .clipped);

  interp_filter #(.W(SAMPLE_W), .LOG2_L(LOG2_L)) u_filter (
    .clk, .rst_n, .in_valid(gain_valid), .in_sample(gain_sample),
    .out_tick(dac_tick), .out_valid(filt_valid), .out_sample(filt_sample));

  assign dac_start = filt_valid & ~dac_busy;

  dac_spi #(.SAMPLE_W(SAMPLE_W)) u_dac (
    .clk, .rst_n, .start(dac_start),
    .sample(output_en ? filt_sample : sample_t'(2 ** (SAMPLE_W - 1))),
    .busy(dac_busy), .done(dac_done),
    .spi_sck, .spi_mosi, .dac_cs_n, .dac_clr_n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_sample <= sample_t'(2 ** (SAMPLE_W - 1));
    else if (dac_start) dac_sample <= output_en ? filt_sample : sample_t'(2 ** (SAMPLE_W - 1));
  end

  // The DAC word must fit between two DAC ticks.
  a_dac_in_time: assert property (@(posedge clk) disable iff (!rst_n) filt_valid |-> !dac_busy)
    else $error("function_generator_top: DAC still busy at a sample tick");

endmodule
