// frequency_control_tb: checks the frequency settings and output enable.
//
// From the reset setting (1 kHz) steps up past the top and down past the
// bottom and checks the index saturates. For every setting the tuning word is
// compared with 0.1*10**i * 2**49 / 250 kHz computed here, and converted back
// to a frequency to check it is within 0.01 percent (and 1 uHz) of the
// decade value. Presses must toggle output_en.
module frequency_control_tb;
  import fg_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, turn_up, turn_down, press, output_en;
  logic [2:0] freq_idx;
  ftw_t       ftw;
  int         checks = 0, failures = 0;

  frequency_control dut (.clk, .rst_n, .turn_up, .turn_down, .press, .freq_idx, .ftw, .output_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse(input int which);
    turn_up   = (which == 0);
    turn_down = (which == 1);
    press     = (which == 2);
    @(negedge clk);
    turn_up = 1'b0; turn_down = 1'b0; press = 1'b0;
    @(negedge clk);
  endtask

  task automatic check_word();
    real hz, f_got, e;
    hz = 0.1;
    for (int i = 0; i < int'(freq_idx); i++) hz = hz * 10.0;
    e = hz * (2.0 ** 49) / 250000.0;
    check(real'(ftw) >= e - 1.0 && real'(ftw) <= e + 1.0, $sformatf("ftw %0d expected %f", ftw, e));
    f_got = real'(ftw) * 250000.0 / (2.0 ** 49);
    check((f_got - hz) < hz * 1e-4 + 1e-6 && (hz - f_got) < hz * 1e-4 + 1e-6,
          $sformatf("setting %0d gives %f Hz", freq_idx, f_got));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; turn_up = 1'b0; turn_down = 1'b0; press = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(freq_idx == 3'd4 && output_en, "reset: 1 kHz, output on");
    check_word();
    for (int i = 0; i < 5; i++) begin
      pulse(0);
      check(freq_idx == 3'((4 + i + 1 > 6) ? 6 : 4 + i + 1), $sformatf("up to %0d", freq_idx));
      check_word();
    end
    for (int i = 0; i < 9; i++) begin
      pulse(1);
      check(freq_idx == 3'((6 - i - 1 < 0) ? 0 : 6 - i - 1), $sformatf("down to %0d", freq_idx));
      check_word();
    end
    check(ftw == tuning_word(0.1, 250000.0) && ftw != '0, "0.1 Hz word");
    for (int i = 0; i < 4; i++) begin
      pulse(2);
      check(output_en == ((i % 2) == 1), "press toggles output_en");
    end
    // Simultaneous up and down: no change.
    turn_up = 1'b1; turn_down = 1'b1;
    @(negedge clk);
    turn_up = 1'b0; turn_down = 1'b0;
    @(negedge clk);
    check(freq_idx == 3'd0, "up and down together ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
