// sample_clock_tb: checks the DAC and engine tick rates and their alignment.
//
// Counts cycles between ticks for the default division (100, interpolation 2)
// and for a small one (7, interpolation 4): every dac_tick must come exactly
// DAC_DIV cycles after the previous one, every engine tick must coincide with
// a dac_tick, and engine ticks must come every DAC_DIV*INTERP cycles.
module sample_clock_tb;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic dac_a, eng_a, dac_b, eng_b;

  sample_clock dut_a (.clk, .rst_n, .dac_tick(dac_a), .engine_tick(eng_a));
  sample_clock #(.DAC_DIV(7), .INTERP(4)) dut_b (.clk, .rst_n, .dac_tick(dac_b), .engine_tick(eng_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_da, last_ea, last_db, last_eb, n_ea, n_eb;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; last_da = 0; last_ea = -1; last_db = 0; last_eb = -1; n_ea = 0; n_eb = 0;
    repeat (20000) begin
      @(negedge clk);
      cyc++;
      if (dac_a) begin
        check(cyc - last_da == 100, $sformatf("A dac period %0d", cyc - last_da));
        last_da = cyc;
      end
      if (eng_a) begin
        check(dac_a, "A engine tick aligned");
        if (last_ea >= 0) check(cyc - last_ea == 200, $sformatf("A engine period %0d", cyc - last_ea));
        last_ea = cyc;
        n_ea++;
      end
      if (dac_b) begin
        check(cyc - last_db == 7, $sformatf("B dac period %0d", cyc - last_db));
        last_db = cyc;
      end
      if (eng_b) begin
        check(dac_b, "B engine tick aligned");
        if (last_eb >= 0) check(cyc - last_eb == 28, $sformatf("B engine period %0d", cyc - last_eb));
        last_eb = cyc;
        n_eb++;
      end
    end
    check(n_ea == 100 && n_eb >= 714, $sformatf("engine tick counts %0d %0d", n_ea, n_eb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
