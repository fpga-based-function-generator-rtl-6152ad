// waveform_engine_tb: checks the four waveform channels and the selector.
//
// Ticks the engine every 4 cycles with several tuning words and compares all
// channels with a reference computed here from a 64-bit model of the phase:
// the sine with round(128 + 127*sin(2*pi*p/256)) of the top 8 phase bits,
// the square, triangle and ramp with their shaping rules, and the selected
// output with wave_sel. It also checks the two-cycle latency from tick to
// sample_valid, the period-wrap strobe, and counts the periods seen for a
// tuning word of 2**49/16 (16 samples per period).
module waveform_engine_tb;
  import fg_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n, clear, tick;
  ftw_t    ftw;
  wave_t   wave_sel;
  sample_t sine, square, triangle, ramp, sample;
  logic    sample_valid, wrap;
  int      checks = 0, failures = 0;

  waveform_engine dut (.clk, .rst_n, .clear, .tick, .ftw, .wave_sel,
    .sine, .square, .triangle, .ramp, .sample, .sample_valid, .wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int sine_ref(int a);
    return int'($floor(128.0 + 127.0 * $sin(2.0 * 3.14159265358979 * a / 256.0) + 0.5));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ph;
    longint unsigned words [4];
    int              wraps;
    rst_n = 1'b0; clear = 1'b0; tick = 1'b0; ftw = '0; wave_sel = WAVE_SINE;
    words[0] = 64'd1 << 45;                // 16 samples per period
    words[1] = 64'd123456789012345;        // irregular
    words[2] = (64'd1 << 48) - 64'd12345;  // close to half the tick rate
    words[3] = 64'd1 << 38;                // 2048 samples per period
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 4; w++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      ph    = 0;
      ftw   = ftw_t'(words[w]);
      wraps = 0;
      for (int s = 0; s < 300; s++) begin
        int top, half, tri_e;
        bit wrap_e;
        wave_sel = wave_t'($urandom_range(0, 3));
        tick = 1'b1;
        @(negedge clk);
        tick = 1'b0;
        check(!sample_valid, "no sample one cycle after tick");
        wrap_e = ((ph + words[w]) >> 49) != 0;
        ph = (ph + words[w]) & ((64'd1 << 49) - 1);
        @(negedge clk);
        check(sample_valid, "sample_valid two cycles after tick");
        top  = int'(ph >> 41);
        half = int'((ph >> 40) & 255);
        tri_e = (ph >> 48) ? 255 - half : half;
        check(int'(sine) == sine_ref(top), $sformatf("sine %0d exp %0d", sine, sine_ref(top)));
        check(int'(square) == ((ph >> 48) ? 0 : 255), "square");
        check(int'(triangle) == tri_e, $sformatf("triangle %0d exp %0d", triangle, tri_e));
        check(int'(ramp) == top, "ramp");
        check(wrap == wrap_e, "wrap strobe");
        if (wrap) wraps++;
        unique case (wave_sel)
          WAVE_SINE:     check(sample == sine, "select sine");
          WAVE_SQUARE:   check(sample == square, "select square");
          WAVE_TRIANGLE: check(sample == triangle, "select triangle");
          default:       check(sample == ramp, "select ramp");
        endcase
        @(negedge clk);
        check(!sample_valid && !wrap, "strobes last one cycle");
        @(negedge clk);
      end
      if (w == 0) check(wraps == 300 / 16, $sformatf("%0d periods of 16 samples in 300", wraps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
