// interp_filter_tb: checks the linear interpolator at L = 2 and L = 4.
//
// Feeds random samples at the input rate and ticks the output L times per
// input, with each input arriving a few cycles after the L-th tick of the previous
// group, as in the full design. Each output is compared with x[n-1] + floor((x[n]-x[n-1])*k/L)
// computed here, and the number of outputs per input is checked.
module interp_filter_tb;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic in_valid, out_tick;
  logic [7:0] in_sample;
  logic out_valid2, out_valid4;
  logic [7:0] out2, out4;

  interp_filter #(.W(8), .LOG2_L(1)) dut2 (.clk, .rst_n, .in_valid, .in_sample, .out_tick,
    .out_valid(out_valid2), .out_sample(out2));
  interp_filter #(.W(8), .LOG2_L(2)) dut4 (.clk, .rst_n, .in_valid, .in_sample, .out_tick,
    .out_valid(out_valid4), .out_sample(out4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int fdiv(int v, int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs the stimulus for one interpolation factor; the other instance sees
  // the same inputs and is not checked in that pass.
  task automatic run(input int L);
    int prev, cur, outs;
    prev = 128; cur = 128; outs = 0;
    rst_n = 1'b0; in_valid = 1'b0; out_tick = 1'b0; in_sample = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      // A new input arrives a few cycles after the tick that ended the last group.
      repeat (2) @(negedge clk);
      in_sample = (n % 50 < 3) ? ((n % 2) ? 8'd255 : 8'd0) : 8'($urandom());
      in_valid  = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      prev = cur;
      cur  = int'(in_sample);
      for (int k = 0; k < L; k++) begin
        int e;
        repeat (3) @(negedge clk);
        out_tick = 1'b1;
        @(negedge clk);
        out_tick = 1'b0;
        e = prev + fdiv((cur - prev) * k, L);
        if (L == 2) check(out_valid2 && int'(out2) == e, $sformatf("L=2 n=%0d k=%0d got %0d exp %0d", n, k, out2, e));
        else        check(out_valid4 && int'(out4) == e, $sformatf("L=4 n=%0d k=%0d got %0d exp %0d", n, k, out4, e));
        outs++;
      end
    end
    check(outs == 300 * L, $sformatf("L=%0d: %0d outputs for 300 inputs", L, outs));
  endtask

  initial begin
    run(2);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
