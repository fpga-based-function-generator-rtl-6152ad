// waveform_engine: generates sine, square, triangle and ramp samples.
//
// Three phase accumulators, one each for the sine, square and triangle
// channels (the original implementation has three 49-bit accumulators), are
// advanced by the same tuning word on every engine tick, so the channels run
// in lock step. Each tick produces one new 8-bit offset-binary sample on every
// channel (the "new output" strobe of each channel in the simulated
// waveforms):
//   sine     = one-period sine table addressed by the top ROM_AW phase bits
//   square   = 255 in the first half period, 0 in the second
//   triangle = 0 rising to 255 in the first half period, falling back to 0
//   ramp     = the top 8 phase bits (0 rising to 255 over a period),
//              taken from the triangle channel's accumulator
// wave_sel picks the channel that goes on to the gain and filter stages.
// wrap marks the sample that starts a new period; it drives the period
// counting of the sequencer. The shaping formulas and the choice of the ramp
// source are this implementation's.
//
// Timing: tick -> phase registered (cycle 1) -> samples registered (cycle 2);
// sample_valid pulses in cycle 2. Ticks must be at least 2 cycles apart.
module waveform_engine
  import fg_pkg::*;
#(
  parameter int unsigned PHASE_W  = fg_pkg::ACC_W,
  parameter int unsigned TUNE_W  = fg_pkg::FTW_W,
  parameter int unsigned ROM_AW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,         // restart all channels at phase 0
  input  logic             tick,          // engine sample tick
  input  logic [TUNE_W-1:0] ftw,
  input  wave_t            wave_sel,
  output sample_t          sine,
  output sample_t          square,
  output sample_t          triangle,
  output sample_t          ramp,
  output sample_t          sample,        // selected channel
  output logic             sample_valid,  // new sample on every channel
  output logic             wrap           // this sample starts a new period
);

  localparam int unsigned SW = SAMPLE_W;

  logic [PHASE_W-1:0] ph_sine, ph_square, ph_tri;
  logic             wrap_sine, wrap_square, wrap_tri;
  logic             step_q;  // cycle after a tick: phases are fresh
  sample_t          rom_data;

  phase_accumulator #(.ACC_W(PHASE_W), .FTW_W(TUNE_W)) u_acc_sine (
    .clk, .rst_n, .clear, .en(tick), .ftw, .phase(ph_sine), .wrap(wrap_sine));
  phase_accumulator #(.ACC_W(PHASE_W), .FTW_W(TUNE_W)) u_acc_square (
    .clk, .rst_n, .clear, .en(tick), .ftw, .phase(ph_square), .wrap(wrap_square));
  phase_accumulator #(.ACC_W(PHASE_W), .FTW_W(TUNE_W)) u_acc_tri (
    .clk, .rst_n, .clear, .en(tick), .ftw, .phase(ph_tri), .wrap(wrap_tri));

  sine_rom #(.ADDR_W(ROM_AW), .DATA_W(SW)) u_rom (
    .clk, .rd_en(step_q), .addr(ph_sine[PHASE_W-1 -: ROM_AW]), .data(rom_data));

  // The square and triangle channels' wrap flags equal the sine channel's;
  // the sine channel's is used.
  logic [SW-1:0] tri_half;
  always_comb tri_half = ph_tri[PHASE_W-2 -: SW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q       <= 1'b0;
      square       <= '0;
      triangle     <= '0;
      ramp         <= '0;
      sample_valid <= 1'b0;
      wrap         <= 1'b0;
    end else begin
      step_q       <= tick & ~clear;
      sample_valid <= step_q;
      wrap         <= step_q & wrap_sine;
      if (step_q) begin
        square   <= ph_square[PHASE_W-1] ? '0 : '1;
        triangle <= ph_tri[PHASE_W-1] ? ~tri_half : tri_half;
        ramp     <= ph_tri[PHASE_W-1 -: SW];
      end
    end
  end

  assign sine = rom_data;

  always_comb begin
    unique case (wave_sel)
      WAVE_SINE:     sample = sine;
      WAVE_SQUARE:   sample = square;
      WAVE_TRIANGLE: sample = triangle;
      default:       sample = ramp;
    endcase
  end

  // The lock-step channels' wrap flags must agree with the one used.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    wrap_square == wrap_sine && wrap_tri == wrap_sine)
    else $error("waveform_engine: channel accumulators out of step");

endmodule
