// digital_gain_tb: checks amplification, attenuation and saturation.
//
// Every sample value is run through unity, half, double, zero and random
// gains; the expected output is worked out here with integer arithmetic:
// clamp(floor(((x - 128) * g + 32) / 64), -128, 127) + 128, and the clip flag
// when the clamp acts. It also checks the one-cycle latency of out_valid and
// that the output holds when in_valid is low.
module digital_gain_tb;
  logic       clk = 1'b0;
  logic       rst_n, in_valid, out_valid, clipped;
  logic [7:0] in_sample, gain, out_sample;
  int         checks = 0, failures = 0;
  int         clips = 0;

  digital_gain dut (.clk, .rst_n, .in_valid, .in_sample, .gain, .out_valid, .out_sample, .clipped);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int floor_div64(int v);
    return (v >= 0) ? v / 64 : -((-v + 63) / 64);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gains [6];
    rst_n = 1'b0; in_valid = 1'b0; in_sample = 8'd128; gain = 8'd64;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    gains = '{64, 32, 128, 0, 255, 0};
    for (int g = 0; g < 6; g++) begin
      for (int x = 0; x < 256; x++) begin
        int v, e;
        bit c;
        in_sample = 8'(x);
        gain      = (g == 5) ? 8'($urandom_range(0, 255)) : 8'(gains[g]);
        in_valid  = 1'b1;
        v = floor_div64((x - 128) * int'(gain) + 32);
        c = (v > 127) || (v < -128);
        e = ((v > 127) ? 127 : (v < -128) ? -128 : v) + 128;
        @(negedge clk);
        in_valid = 1'b0;
        check(out_valid, "out_valid one cycle after in_valid");
        check(int'(out_sample) == e && clipped == c,
              $sformatf("x=%0d g=%0d got %0d/%b expected %0d/%b", x, gain, out_sample, clipped, e, c));
        if (c) clips++;
        in_sample = 8'($urandom());
        @(negedge clk);
        check(!out_valid && int'(out_sample) == e, "holds without in_valid");
      end
    end
    check(clips > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
