// frequency_control: frequency setting and output enable from the knob.
//
// The output frequency is chosen from NUM_FREQ decade settings, 0.1 Hz,
// 1 Hz, ... 100 kHz (the original design's range, stepped in decades as in its
// 1, 10 and 100 kHz results). Each clockwise detent moves one setting up and
// each anticlockwise detent one down, stopping at the ends. The tuning word
// for setting i is round(0.1 * 10**i * 2**ACC_W / ENGINE_HZ), computed at
// elaboration, so ENGINE_HZ must be the rate of the engine ticks. A press of
// the knob toggles output_en (the output is enabled after reset). The decade
// steps, the saturation and the use of the push button are this
// implementation's choices.
//
// Timing: freq_idx, ftw and output_en change the cycle after a pulse.
module frequency_control
  import fg_pkg::*;
#(
  parameter int unsigned ENGINE_HZ = fg_pkg::CLK_HZ / (fg_pkg::DAC_DIV * fg_pkg::INTERP),
  parameter int unsigned DEFAULT   = fg_pkg::DEFAULT_FREQ
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  turn_up,
  input  logic                  turn_down,
  input  logic                  press,
  output logic [FREQ_IDX_W-1:0] freq_idx,
  output ftw_t                  ftw,
  output logic                  output_en
);

  typedef ftw_t ftw_table_t [NUM_FREQ];

  function automatic ftw_table_t make_table();
    ftw_table_t t;
    for (int unsigned i = 0; i < NUM_FREQ; i++)
      t[i] = tuning_word(freq_hz(i), real'(ENGINE_HZ));
    return t;
  endfunction

  localparam ftw_table_t FTW_TABLE = make_table();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_idx  <= FREQ_IDX_W'(DEFAULT);
      output_en <= 1'b1;
    end else begin
      if (turn_up && !turn_down && freq_idx != FREQ_IDX_W'(NUM_FREQ - 1))
        freq_idx <= freq_idx + 1'b1;
      else if (turn_down && !turn_up && freq_idx != '0)
        freq_idx <= freq_idx - 1'b1;
      if (press) output_en <= ~output_en;
    end
  end

  always_comb ftw = FTW_TABLE[freq_idx];

endmodule
