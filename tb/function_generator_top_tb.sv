// function_generator_top_tb: end-to-end test of the function generator at
// its default parameters (50 MHz clock, 500 kHz DAC rate, 2x interpolation,
// 1 ms debounce).
//
// A reference model runs beside the design: on every new engine sample it
// advances a 64-bit phase by the tuning word of the current frequency
// setting (computed here from 0.1*10**i Hz), derives the four channel values,
// applies the gain and the linear interpolation, and predicts every code the
// DAC model receives. The sequencer is modelled too. The stimulus walks
// through the original design's 1 kHz, 10 kHz and 100 kHz settings with sine,
// square and triangle (and ramp), measures the frequency of the square wave
// at the DAC by counting its rising edges, turns the knob down to 0.1 Hz and
// back, switches the output off and on with the push button, drives the gain
// into saturation and into attenuation, and runs the sequence and script
// modes. Each of these mechanisms is counted and must happen at least once.
module function_generator_top_tb;
  import fg_pkg::*;

  localparam int    CLK_PERIOD = 20;  // ns, 50 MHz
  localparam real   ENG_HZ     = 250000.0;
  localparam int    DIV        = 100;

  logic       clk = 1'b0;
  logic       rst_b, rot_a, rot_b, rot_center, trigger;
  wave_t      sw_wave;
  mode_t      sw_mode;
  logic [7:0] gain;
  logic       seq_we;
  logic [2:0] seq_waddr;
  seq_entry_t seq_wdata;
  logic [3:0] seq_len;
  logic       spi_sck, spi_mosi, dac_cs_n, dac_clr_n;
  logic [2:0] freq_idx;
  logic       output_en, dac_start, dac_done, clipped, seq_advance, sample_new;
  wave_t      wave_sel;
  sample_t    dac_sample, sine, square, triangle, ramp;
  logic [2:0] seq_index;

  logic [11:0] code_a, code_d;
  int          updates, bad_words;
  logic [3:0]  last_cmd, last_addr;
  real         vout;

  function_generator_top dut (
    .clk, .rst_b, .rot_a, .rot_b, .rot_center, .sw_wave, .sw_mode, .trigger, .gain,
    .seq_we, .seq_waddr, .seq_wdata, .seq_len,
    .spi_sck, .spi_mosi, .dac_cs_n, .dac_clr_n,
    .freq_idx, .output_en, .wave_sel, .dac_sample, .dac_start, .dac_done, .clipped,
    .seq_index, .seq_advance, .sine, .square, .triangle, .ramp, .sample_new);

  ltc2624_model u_dac (.sck(spi_sck), .mosi(spi_mosi), .cs_n(dac_cs_n), .clr_n(dac_clr_n),
    .code_a, .code_d, .updates, .bad_words, .last_cmd, .last_addr, .vout);

  always #(CLK_PERIOD / 2) clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- model
  longint unsigned ph = 0;
  int    exp_idx = DEFAULT_FREQ;
  bit    exp_en  = 1'b1;
  int    x_prev = 128, x_cur = 128, k = 0;
  int    pend_q[$];      // predicted codes of DAC words in flight
  int    model_wraps = 0;
  // sequencer model
  int    s_idx = 0, s_cnt = 0;
  wave_t s_wave [8];
  int    s_per  [8];
  int    s_len = 4;
  mode_t mode_q = MODE_MANUAL;

  // mechanism counters
  int n_up = 0, n_down = 0, n_off = 0, n_on = 0, n_clip = 0, n_atten = 0;
  int n_seq_adv = 0, n_script_adv = 0, n_interp = 0, n_words = 0;
  int n_wave [4] = '{0, 0, 0, 0};
  int n_samples = 0;

  function automatic longint unsigned ftw_ref(int idx);
    real hz;
    hz = 0.1;
    for (int i = 0; i < idx; i++) hz = hz * 10.0;
    return longint'($floor(hz * (2.0 ** 49) / ENG_HZ + 0.5));
  endfunction

  function automatic int sine_ref(int a);
    return int'($floor(128.0 + 127.0 * $sin(2.0 * 3.14159265358979 * a / 256.0) + 0.5));
  endfunction

  function automatic int fdiv(int v, int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic int gain_ref(int x, int g);
    int v;
    v = fdiv((x - 128) * g + 32, 64);
    return ((v > 127) ? 127 : (v < -128) ? -128 : v) + 128;
  endfunction

  bit checking = 1'b0;

  always @(negedge clk) begin
    if (rst_b && checking) begin
      // New engine sample on all channels.
      if (sample_new) begin
        longint unsigned s;
        int top, half, ch [4], sel, g;
        bit wrap;
        check(int'(freq_idx) == exp_idx, $sformatf("frequency setting %0d expected %0d", freq_idx, exp_idx));
        s    = ph + ftw_ref(exp_idx);
        wrap = (s >> 49) != 0;
        ph   = s & ((64'd1 << 49) - 1);
        if (wrap) model_wraps++;
        top   = int'(ph >> 41);
        half  = int'((ph >> 40) & 255);
        ch[0] = sine_ref(top);
        ch[1] = (ph >> 48) ? 0 : 255;
        ch[2] = (ph >> 48) ? 255 - half : half;
        ch[3] = top;
        check(int'(sine) == ch[0] && int'(square) == ch[1] && int'(triangle) == ch[2] && int'(ramp) == ch[3],
              $sformatf("channels %0d %0d %0d %0d expected %0d %0d %0d %0d",
                        sine, square, triangle, ramp, ch[0], ch[1], ch[2], ch[3]));
        // Waveform selection: switches or the sequencer model.
        sel = (sw_mode == MODE_MANUAL) ? int'(sw_wave) : int'(s_wave[s_idx]);
        check(int'(wave_sel) == sel, $sformatf("wave_sel %0d expected %0d", wave_sel, sel));
        n_wave[sel]++;
        n_samples++;
        g = gain_ref(ch[sel], int'(gain));
        if (fdiv((ch[sel] - 128) * int'(gain) + 32, 64) > 127 || fdiv((ch[sel] - 128) * int'(gain) + 32, 64) < -128)
          n_clip++;
        if (gain < 8'd64 && g != ch[sel]) n_atten++;
        x_prev = x_cur;
        x_cur  = g;
        k      = 0;
        // Sequencer model: advance after the period count in sequence mode.
        if (sw_mode == MODE_SEQUENCE && wrap) begin
          s_cnt++;
          if (s_cnt >= ((s_per[s_idx] == 0) ? 1 : s_per[s_idx])) begin
            s_cnt = 0;
            s_idx = (s_idx + 1) % s_len;
            n_seq_adv++;
          end
        end
      end
      // A DAC word starts: predict its code.
      if (dac_start) begin
        int e;
        e = x_prev + fdiv((x_cur - x_prev) * k, 2);
        if (k > 0 && e != x_prev && e != x_cur) n_interp++;
        k++;
        check(output_en == exp_en, "output enable state");
        pend_q.push_back(exp_en ? e : 128);
      end
      // A DAC word has been latched by the DAC model.
      if (dac_done) begin
        int e;
        n_words++;
        if (pend_q.size() == 0) begin
          check(1'b0, "DAC word without a start");
        end else begin
          e = pend_q.pop_front();
          check(code_a == 12'(e << 4), $sformatf("DAC code %h expected %h", code_a, 12'(e << 4)));
        end
      end
    end
  end

  // Script-mode triggers and mode changes are applied to the model here.
  always @(negedge clk) begin
    if (rst_b && checking) begin
      if (sw_mode != mode_q) begin
        s_idx = 0;
        s_cnt = 0;
      end else if (sw_mode == MODE_SCRIPT && trigger) begin
        s_idx = (s_idx + 1) % s_len;
        n_script_adv++;
      end
      mode_q = sw_mode;
    end
  end

  // ---------------------------------------------------------------- stimulus
  task automatic wait_sample();
    do @(negedge clk); while (!sample_new);
  endtask

  task automatic move(input bit is_a, input bit v);
    repeat ($urandom_range(0, 2)) begin
      if (is_a) rot_a = ~rot_a; else rot_b = ~rot_b;
      @(negedge clk);
    end
    if (is_a) rot_a = v; else rot_b = v;
    repeat (5) @(negedge clk);
  endtask

  // One knob detent, placed between two engine samples.
  task automatic detent(input bit cw);
    wait_sample();
    repeat (5) @(negedge clk);
    if (cw) begin
      move(1, 1); move(0, 1); move(1, 0); move(0, 0);
      if (exp_idx < NUM_FREQ - 1) exp_idx++;
      n_up++;
    end else begin
      move(0, 1); move(1, 1); move(0, 0); move(1, 0);
      if (exp_idx > 0) exp_idx--;
      n_down++;
    end
    repeat (10) @(negedge clk);
    check(int'(freq_idx) == exp_idx, $sformatf("knob: setting %0d expected %0d", freq_idx, exp_idx));
  endtask

  // Push the knob; the output enable flips after the debounce time. The model
  // flips at the first DAC word after the design does.
  task automatic push();
    rot_center = 1'b1;
    repeat (60000) @(negedge clk);
    rot_center = 1'b0;
    repeat (60000) @(negedge clk);
  endtask

  always @(negedge clk) begin
    if (rst_b && checking && output_en != exp_en && !dac_start) begin
      exp_en = output_en;
      if (!output_en) n_off++; else n_on++;
    end
  end

  // Change the gain between two engine samples.
  task automatic set_gain(input int g);
    wait_sample();
    @(negedge clk);
    @(negedge clk);
    gain = 8'(g);
  endtask

  // Count rising edges of the DAC code's MSB over a window, with the square
  // wave selected at unity gain, and compare with the set frequency.
  task automatic measure(input real hz, input int periods);
    int    cycles, edges;
    bit    last_hi;
    real   expected;
    cycles   = int'(real'(periods) / hz * 50.0e6);
    edges    = 0;
    last_hi  = code_a[11];
    repeat (cycles) begin
      @(negedge clk);
      if (code_a[11] && !last_hi) edges++;
      last_hi = code_a[11];
    end
    expected = hz * real'(cycles) / 50.0e6;
    check(real'(edges) >= expected - 1.0 && real'(edges) <= expected + 1.0,
          $sformatf("%0.1f Hz: %0d rising edges in %0d cycles, expected %0.1f", hz, edges, cycles, expected));
    $display("measured %0.1f Hz square: %0d periods in %0d cycles", hz, edges, cycles);
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int adv0, w0, upd0;
    rst_b = 1'b0; rot_a = 1'b0; rot_b = 1'b0; rot_center = 1'b0; trigger = 1'b0;
    sw_wave = WAVE_SINE; sw_mode = MODE_MANUAL; gain = 8'd64;
    seq_we = 1'b0; seq_waddr = '0; seq_wdata = '0; seq_len = 4'd4;
    for (int i = 0; i < 8; i++) begin
      s_wave[i] = (i < 4) ? wave_t'(i) : WAVE_SINE;
      s_per[i]  = (i < 4) ? 2 : 1;
    end
    repeat (5) @(negedge clk);
    rst_b = 1'b1;
    checking = 1'b1;

    // 1 kHz sine, one full period (250 engine samples, 500 DAC words).
    upd0 = updates;
    repeat (250) wait_sample();
    check(updates - upd0 >= 498 && updates - upd0 <= 501, $sformatf("%0d DAC words per 250 samples", updates - upd0));
    // 1 kHz square: frequency at the DAC.
    sw_wave = WAVE_SQUARE;
    measure(1000.0, 4);
    // 10 kHz: one detent up.
    detent(1'b1);
    measure(10000.0, 20);
    sw_wave = WAVE_TRIANGLE;
    repeat (100) wait_sample();
    // 100 kHz.
    detent(1'b1);
    sw_wave = WAVE_SQUARE;
    measure(100000.0, 100);
    sw_wave = WAVE_SINE;
    repeat (50) wait_sample();
    // Past the top, then down to 0.1 Hz and back to 10 kHz.
    detent(1'b1);
    repeat (6) detent(1'b0);
    detent(1'b0);
    sw_wave = WAVE_RAMP;
    repeat (20) wait_sample();
    repeat (5) detent(1'b1);
    // Gain: double (saturates the sine), then a quarter.
    sw_wave = WAVE_SINE;
    set_gain(128);
    repeat (100) wait_sample();
    set_gain(16);
    repeat (100) wait_sample();
    set_gain(64);
    // Output off and on with the push button.
    push();
    check(!output_en, "output off after a press");
    repeat (20) wait_sample();
    check(dac_sample == 8'd128 && code_a == 12'h800, "mid-scale while off");
    push();
    check(output_en, "output on after a second press");
    // Sequence mode: sine, square, triangle, ramp for 2 periods each, twice.
    adv0 = n_seq_adv;
    wait_sample();
    @(negedge clk);
    sw_mode = MODE_SEQUENCE;
    w0 = model_wraps;
    while (model_wraps - w0 < 17) wait_sample();
    check(n_seq_adv - adv0 >= 8, $sformatf("%0d sequence steps", n_seq_adv - adv0));
    // Back to manual, load a 3-entry sequence and play it.
    wait_sample();
    @(negedge clk);
    sw_mode = MODE_MANUAL;
    for (int i = 0; i < 3; i++) begin
      seq_we = 1'b1; seq_waddr = 3'(i); seq_wdata = '{wave: wave_t'(3 - i), periods: 8'(i + 1)};
      @(negedge clk);
      s_wave[i] = wave_t'(3 - i);
      s_per[i]  = i + 1;
    end
    seq_we  = 1'b0;
    seq_len = 4'd3;
    s_len   = 3;
    wait_sample();
    @(negedge clk);
    sw_mode = MODE_SEQUENCE;
    w0 = model_wraps;
    while (model_wraps - w0 < 13) wait_sample();
    // Script mode: each trigger moves to the next instruction.
    wait_sample();
    @(negedge clk);
    sw_mode = MODE_SCRIPT;
    for (int t = 0; t < 5; t++) begin
      repeat (30) wait_sample();
      @(negedge clk);
      trigger = 1'b1;
      @(negedge clk);
      trigger = 1'b0;
    end
    repeat (30) wait_sample();
    check(int'(seq_index) == 5 % 3, "script index after 5 triggers");
    wait_sample();
    @(negedge clk);
    sw_mode = MODE_MANUAL;
    // Let the last DAC words arrive.
    repeat (300) @(negedge clk);
    check(bad_words == 0, "all DAC words 24 bits");

    $display("mechanisms: up %0d down %0d off %0d on %0d clip %0d atten %0d seq %0d script %0d interp %0d words %0d",
             n_up, n_down, n_off, n_on, n_clip, n_atten, n_seq_adv, n_script_adv, n_interp, n_words);
    $display("samples per waveform: sine %0d square %0d triangle %0d ramp %0d",
             n_wave[0], n_wave[1], n_wave[2], n_wave[3]);
    check(n_up > 0, "knob up happened");
    check(n_down > 0, "knob down happened");
    check(n_off > 0 && n_on > 0, "output switched off and on");
    check(n_clip > 0, "gain saturation happened");
    check(n_atten > 0, "attenuation happened");
    check(n_seq_adv > 0, "sequence mode advanced");
    check(n_script_adv > 0, "script mode advanced");
    check(n_interp > 0, "interpolated DAC words");
    check(n_words > 0, "DAC words");
    for (int w = 0; w < 4; w++) check(n_wave[w] > 0, $sformatf("waveform %0d played", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
