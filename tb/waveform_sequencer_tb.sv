// waveform_sequencer_tb: checks manual, sequence and script modes.
//
// Manual mode must follow the switches. Sequence mode is run on the reset
// contents (sine, square, triangle, ramp for 2 periods each, 4 entries) and on
// a loaded sequence with a zero period count; the waveform is compared, after
// every period strobe, with a model of the instruction list. Script mode must
// move to the next entry on each trigger and ignore period strobes. A mode
// change must restart at entry 0.
module waveform_sequencer_tb;
  import fg_pkg::*;
  localparam int DEPTH = 8;

  logic       clk = 1'b0;
  logic       rst_n;
  mode_t      mode;
  wave_t      manual_wave;
  logic       period_wrap, trigger;
  logic [3:0] seq_len;
  logic       we;
  logic [2:0] waddr;
  seq_entry_t wdata;
  wave_t      wave_sel;
  logic [2:0] index;
  logic       advance;
  int         checks = 0, failures = 0;
  int         adv_seen = 0;

  waveform_sequencer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .mode, .manual_wave, .period_wrap,
    .trigger, .seq_len, .we, .waddr, .wdata, .wave_sel, .index, .advance);

  always #5 clk = ~clk;
  always @(posedge clk) if (advance) adv_seen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse_wrap();
    period_wrap = 1'b1;
    @(negedge clk);
    period_wrap = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wave_t m_wave [DEPTH];
    int    m_per  [DEPTH];
    int    idx, cnt;
    rst_n = 1'b0; mode = MODE_MANUAL; manual_wave = WAVE_SINE; period_wrap = 1'b0;
    trigger = 1'b0; seq_len = 4'd4; we = 1'b0; waddr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Manual mode.
    for (int i = 0; i < 8; i++) begin
      manual_wave = wave_t'(i % 4);
      pulse_wrap();
      check(wave_sel == manual_wave && index == 0, "manual follows switches");
    end
    // Sequence mode on the reset contents.
    for (int i = 0; i < DEPTH; i++) begin
      m_wave[i] = (i < 4) ? wave_t'(i) : WAVE_SINE;
      m_per[i]  = (i < 4) ? 2 : 1;
    end
    mode = MODE_SEQUENCE;
    @(negedge clk);
    idx = 0; cnt = 0;
    check(wave_sel == WAVE_SINE && index == 0, "sequence starts at entry 0");
    for (int p = 0; p < 40; p++) begin
      pulse_wrap();
      cnt++;
      if (cnt >= m_per[idx]) begin
        cnt = 0;
        idx = (idx + 1) % 4;
      end
      check(index == 3'(idx) && wave_sel == m_wave[idx],
            $sformatf("sequence period %0d: entry %0d wave %0d, expected %0d %0d", p, index, wave_sel, idx, m_wave[idx]));
    end
    // Load a new 6-entry sequence with a zero count (taken as 1).
    for (int i = 0; i < 6; i++) begin
      m_wave[i] = wave_t'($urandom_range(0, 3));
      m_per[i]  = (i == 2) ? 0 : $urandom_range(1, 3);
      we = 1'b1; waddr = 3'(i); wdata = '{wave: m_wave[i], periods: 8'(m_per[i])};
      @(negedge clk);
    end
    we = 1'b0;
    seq_len = 4'd6;
    mode = MODE_MANUAL;
    @(negedge clk);
    mode = MODE_SEQUENCE;
    @(negedge clk);
    idx = 0; cnt = 0;
    check(index == 0 && wave_sel == m_wave[0], "mode change restarts at entry 0");
    for (int p = 0; p < 60; p++) begin
      pulse_wrap();
      cnt++;
      if (cnt >= ((m_per[idx] == 0) ? 1 : m_per[idx])) begin
        cnt = 0;
        idx = (idx + 1) % 6;
      end
      check(index == 3'(idx) && wave_sel == m_wave[idx], $sformatf("loaded sequence period %0d", p));
    end
    // Script mode: triggers advance, period strobes do not.
    mode = MODE_SCRIPT;
    @(negedge clk);
    idx = 0;
    for (int t = 0; t < 20; t++) begin
      pulse_wrap();
      check(index == 3'(idx), "script ignores period strobes");
      trigger = 1'b1;
      @(negedge clk);
      trigger = 1'b0;
      idx = (idx + 1) % 6;
      check(index == 3'(idx) && wave_sel == m_wave[idx], $sformatf("script trigger %0d", t));
    end
    check(adv_seen > 0, "advance strobe seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
