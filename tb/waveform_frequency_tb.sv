// waveform_frequency_tb: plays sine, square and triangle at 1 kHz, 10 kHz
// and 100 kHz, 8-bit samples, through the whole design at its default
// parameters, and measures them at the DAC model's output.
//
// For each of the nine cases it counts the rising mid-scale crossings of the
// DAC code over a window and compares the count with the set frequency. At
// 1 kHz, where a period has 500 DAC words, it also checks the shape: full
// swing for all three, at least 95 percent of the words at a rail for the
// square, and the share of words in the top eighth of the range (code above
// 223): about 23 percent for a sine (asin(95/127)) and 12.5 percent for a
// triangle.
module waveform_frequency_tb;
  import fg_pkg::*;

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

  always #10 clk = ~clk;  // one clock = 50 MHz cycle

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic move(input bit is_a, input bit v);
    if (is_a) rot_a = v; else rot_b = v;
    repeat (8) @(negedge clk);
  endtask

  task automatic knob_up();
    move(1, 1); move(0, 1); move(1, 0); move(0, 0);
  endtask

  // Measures the current waveform over `periods` periods of `hz`.
  task automatic measure(input real hz, input int periods, input wave_t w);
    int  cycles, crossings, words, hi_words, rail_words, cmax, cmin;
    logic [11:0] last;
    real expected, share, rail;
    // Let the pipeline fill with the new waveform.
    repeat (2000) @(negedge clk);
    cycles = int'(real'(periods) / hz * 50.0e6);
    crossings = 0; words = 0; hi_words = 0; rail_words = 0; cmax = 0; cmin = 255;
    last = code_a;
    repeat (cycles) begin
      @(negedge clk);
      if (dac_done) begin
        int c;
        c = int'(code_a >> 4);
        if (last < 12'h800 && code_a >= 12'h800) crossings++;
        last = code_a;
        words++;
        if (c > 223) hi_words++;
        if (c == 0 || c == 255) rail_words++;
        if (c > cmax) cmax = c;
        if (c < cmin) cmin = c;
      end
    end
    expected = hz * real'(cycles) / 50.0e6;
    check(real'(crossings) >= expected - 1.0 && real'(crossings) <= expected + 1.0,
          $sformatf("%s at %0.0f Hz: %0d periods, expected %0.1f", w.name(), hz, crossings, expected));
    share = real'(hi_words) / real'(words);
    rail  = real'(rail_words) / real'(words);
    $display("%-13s %7.0f Hz: %0d periods in %0d cycles, %0d DAC words, codes %0d..%0d, top-eighth share %0.3f",
             w.name(), hz, crossings, cycles, words, cmin, cmax, share);
    if (hz < 2000.0) begin
      check(cmax >= 250 && cmin <= 5, $sformatf("%s full swing %0d..%0d", w.name(), cmin, cmax));
      unique case (w)
        WAVE_SINE:     check(share > 0.20 && share < 0.26, $sformatf("sine shape %0.3f", share));
        WAVE_TRIANGLE: check(share > 0.10 && share < 0.15, $sformatf("triangle shape %0.3f", share));
        default:       check(rail > 0.95, $sformatf("square at the rails %0.3f", rail));
      endcase
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hz;
    int  periods;
    rst_b = 1'b0; rot_a = 1'b0; rot_b = 1'b0; rot_center = 1'b0; trigger = 1'b0;
    sw_wave = WAVE_SINE; sw_mode = MODE_MANUAL; gain = 8'd64;
    seq_we = 1'b0; seq_waddr = '0; seq_wdata = '0; seq_len = 4'd4;
    repeat (5) @(negedge clk);
    rst_b = 1'b1;
    hz = 1000.0;
    periods = 3;
    for (int f = 0; f < 3; f++) begin
      check(int'(freq_idx) == 4 + f, $sformatf("frequency setting %0d", freq_idx));
      for (int w = 0; w < 3; w++) begin
        sw_wave = wave_t'(w);
        measure(hz, periods, wave_t'(w));
      end
      knob_up();
      hz = hz * 10.0;
      periods = periods * 10;
    end
    check(bad_words == 0, "DAC words well formed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
