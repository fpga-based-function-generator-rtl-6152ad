// fg_pkg: types and constants shared by the function generator.
//
// The generator is a direct digital synthesis (DDS) design: a phase
// accumulator advanced once per engine sample by a tuning word addresses a
// one-period waveform table or shapes the phase directly. Samples are 8 bits
// wide, the frame size used for all simulated waveforms. The phase
// accumulator is 49 bits and the tuning word 48 bits, the widths listed in
// the synthesis statistics of the original implementation. The 50 MHz board
// clock, the 500 kHz DAC update rate and the 2x interpolation are choices of
// this implementation.
package fg_pkg;

  // Sample (frame) width.
  localparam int unsigned SAMPLE_W = 8;
  // Phase accumulator and tuning-word widths.
  localparam int unsigned ACC_W = 49;
  localparam int unsigned FTW_W = 48;

  // Board clock and rates.
  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned DAC_DIV = 100;  // clocks per DAC update (500 kHz)
  localparam int unsigned INTERP  = 2;    // DAC updates per engine sample

  // Frequency settings selectable with the knob: decades from 0.1 Hz to 100 kHz.
  localparam int unsigned NUM_FREQ     = 7;
  localparam int unsigned FREQ_IDX_W   = 3;
  localparam int unsigned DEFAULT_FREQ = 4;  // 1 kHz

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [FTW_W-1:0]    ftw_t;

  // Output waveform selection (two slide switches).
  typedef enum logic [1:0] {
    WAVE_SINE     = 2'd0,
    WAVE_SQUARE   = 2'd1,
    WAVE_TRIANGLE = 2'd2,
    WAVE_RAMP     = 2'd3
  } wave_t;

  // Linking/looping mode of the waveform engine.
  typedef enum logic [1:0] {
    MODE_MANUAL   = 2'd0,  // waveform from the switches
    MODE_SEQUENCE = 2'd1,  // sequence instructions, advance after a period count
    MODE_SCRIPT   = 2'd2   // sequence instructions, advance on a trigger
  } mode_t;

  // One sequence instruction in onboard memory.
  typedef struct packed {
    wave_t      wave;     // waveform to play
    logic [7:0] periods;  // periods to play in sequence mode (0 counts as 1)
  } seq_entry_t;

  // Frequency of setting idx in Hz: 0.1 * 10**idx.
  function automatic real freq_hz(int unsigned idx);
    real f;
    f = 0.1;
    for (int unsigned i = 0; i < idx; i++) f = f * 10.0;
    return f;
  endfunction

  // Tuning word giving freq Hz at an accumulator clocked at fs Hz:
  // round(freq * 2**ACC_W / fs).
  function automatic ftw_t tuning_word(real freq, real fs);
    real w;
    w = freq * (2.0 ** ACC_W) / fs + 0.5;
    return ftw_t'(longint'($floor(w)));
  endfunction

endpackage
