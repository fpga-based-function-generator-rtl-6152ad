// waveform_sequencer: links and loops waveform segments.
//
// Holds DEPTH sequence instructions (waveform, period count) in a small
// writable memory and chooses the waveform the engine outputs:
//   MODE_MANUAL    the waveform set on the switches (manual_wave)
//   MODE_SEQUENCE  plays entry 0, 1, ... seq_len-1 and loops; each entry
//                  lasts its period count (0 counts as 1), counted with the
//                  engine's period-wrap strobe
//   MODE_SCRIPT    plays the current entry until a trigger, then moves on
// Sequence and script generation modes and storing the sequence in onboard
// memory follow the original design; the instruction format, the depth, the
// trigger-to-advance rule and the default contents are this design's own.
// Reset loads entries 0..3 with sine, square, triangle and ramp for 2 periods
// each and the rest with sine for 1 period. Changing mode restarts at entry 0.
//
// Interface: write port (we, waddr, wdata) loads instructions at any time;
// seq_len (1..DEPTH, 0 is taken as DEPTH) is the number of entries played.
// Timing: wave_sel and index change the cycle after the wrap or trigger.
module waveform_sequencer
  import fg_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_t       mode,
  input  wave_t       manual_wave,
  input  logic        period_wrap,  // engine finished a period
  input  logic        trigger,      // one-cycle trigger pulse (script mode)
  input  logic [AW:0] seq_len,
  input  logic        we,
  input  logic [AW-1:0] waddr,
  input  seq_entry_t  wdata,
  output wave_t       wave_sel,
  output logic [AW-1:0] index,
  output logic        advance       // pulses when the sequence moves on
);

  seq_entry_t       mem [DEPTH];
  logic [7:0]       count;
  mode_t            mode_q;
  logic [AW:0]      len;
  logic [AW-1:0]    next_index;
  logic [7:0]       target;
  logic             do_adv;

  always_comb begin
    len        = (seq_len == '0 || seq_len > (AW+1)'(DEPTH)) ? (AW+1)'(DEPTH) : seq_len;
    next_index = ((AW+1)'(index) + 1'b1 >= len) ? '0 : index + 1'b1;
    target     = (mem[index].periods == 8'd0) ? 8'd1 : mem[index].periods;
    unique case (mode)
      MODE_SEQUENCE: do_adv = period_wrap && (count + 8'd1 >= target);
      MODE_SCRIPT:   do_adv = trigger;
      default:       do_adv = 1'b0;
    endcase
    wave_sel = (mode == MODE_SEQUENCE || mode == MODE_SCRIPT) ? mem[index].wave : manual_wave;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        mem[i].wave    <= (i < 4) ? wave_t'(i) : WAVE_SINE;
        mem[i].periods <= (i < 4) ? 8'd2 : 8'd1;
      end
      index   <= '0;
      count   <= '0;
      mode_q  <= MODE_MANUAL;
      advance <= 1'b0;
    end else begin
      if (we) mem[waddr] <= wdata;
      mode_q  <= mode;
      advance <= 1'b0;
      if (mode != mode_q) begin
        index <= '0;
        count <= '0;
      end else if (do_adv) begin
        index   <= next_index;
        count   <= '0;
        advance <= 1'b1;
      end else if (mode == MODE_SEQUENCE && period_wrap) begin
        count <= count + 8'd1;
      end
    end
  end

endmodule
