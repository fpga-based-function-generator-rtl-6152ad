// phase_accumulator_tb: checks the DDS phase accumulator.
//
// Drives random tuning words with en asserted in random cycles and compares
// phase and wrap with a 64-bit reference model, then checks that a full
// 49-bit run with tuning word 2**46 wraps exactly every 8 steps, and that
// clear restarts the phase.
module phase_accumulator_tb;
  localparam int AW = 49;
  localparam int FW = 48;

  logic          clk = 1'b0;
  logic          rst_n, clear, en;
  logic [FW-1:0] ftw;
  logic [AW-1:0] phase;
  logic          wrap;
  int            checks = 0, failures = 0;
  longint unsigned model;
  bit              model_wrap;

  phase_accumulator #(.ACC_W(AW), .FTW_W(FW)) dut (.clk, .rst_n, .clear, .en, .ftw, .phase, .wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps, steps;
    rst_n = 1'b0; clear = 1'b0; en = 1'b0; ftw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      longint unsigned s;
      en  = ($urandom_range(0, 3) != 0);
      ftw = {$urandom(), $urandom()} & ((64'd1 << FW) - 1);
      if (i % 7 == 0) ftw = FW'(1) << (FW - 1);  // largest step class
      s = model + (en ? 64'(ftw) : 64'd0);
      model_wrap = en && (s >> AW) != 0;
      model = s & ((64'd1 << AW) - 1);
      @(posedge clk);
      #1;
      check(64'(phase) == model, $sformatf("step %0d phase %h expected %h", i, phase, model));
      check(wrap == model_wrap, $sformatf("step %0d wrap %b expected %b", i, wrap, model_wrap));
      @(negedge clk);
    end
    // Clear restarts the phase.
    clear = 1'b1;
    @(negedge clk);
    check(phase == '0 && !wrap, "clear");
    clear = 1'b0;
    // 2**46 = 1/8 of the phase circle: one wrap every 8 steps.
    ftw = FW'(1) << 46;
    en = 1'b1;
    wraps = 0; steps = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      steps++;
      if (wrap) begin
        wraps++;
        check(steps % 8 == 0, $sformatf("wrap after %0d steps", steps));
      end
    end
    check(wraps == 8, $sformatf("%0d wraps in 64 steps", wraps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
