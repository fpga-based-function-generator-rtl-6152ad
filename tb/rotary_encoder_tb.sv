// rotary_encoder_tb: checks knob decoding with contact bounce.
//
// Turns the knob clockwise and anticlockwise in random order, with bounce on
// every contact change, and checks that each detent gives exactly one pulse in
// the right direction. Presses the push button with bounce shorter than the
// debounce time (no press) and holds it longer (exactly one press), and checks
// the press is registered DEBOUNCE+2 cycles after the contact settles
// (seen here one sampling edge later). Debounce time is
// reduced to 20 cycles.
module rotary_encoder_tb;
  localparam int DB = 20;

  logic clk = 1'b0;
  logic rst_n, rot_a, rot_b, rot_center, turn_up, turn_down, press;
  int   checks = 0, failures = 0;
  int   n_up = 0, n_down = 0, n_press = 0, cyc = 0, press_cyc = 0;

  rotary_encoder #(.DEBOUNCE(DB)) dut (.clk, .rst_n, .rot_a, .rot_b, .rot_center, .turn_up, .turn_down, .press);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && turn_up) n_up++;
    if (rst_n && turn_down) n_down++;
    if (rst_n && press) begin
      n_press++;
      press_cyc = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sets a contact to v, bouncing first.
  task automatic move(input bit is_a, input bit v);
    int n;
    n = $urandom_range(0, 4);
    for (int i = 0; i < n; i++) begin
      if (is_a) rot_a = ~rot_a; else rot_b = ~rot_b;
      repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    if (is_a) rot_a = v; else rot_b = v;
    repeat (6) @(negedge clk);
  endtask

  task automatic detent(input bit cw);
    if (cw) begin
      move(1, 1); move(0, 1); move(1, 0); move(0, 0);
    end else begin
      move(0, 1); move(1, 1); move(0, 0); move(1, 0);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_up, e_down, u0, d0, t_settle;
    rst_n = 1'b0; rot_a = 1'b0; rot_b = 1'b0; rot_center = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    e_up = 0; e_down = 0;
    for (int i = 0; i < 100; i++) begin
      bit cw;
      cw = $urandom_range(0, 1);
      u0 = n_up; d0 = n_down;
      detent(cw);
      if (cw) e_up++; else e_down++;
      check(n_up == u0 + (cw ? 1 : 0) && n_down == d0 + (cw ? 0 : 1),
            $sformatf("detent %0d (%s): up %0d down %0d", i, cw ? "cw" : "ccw", n_up - u0, n_down - d0));
    end
    check(n_up == e_up && n_down == e_down, "detent totals");
    // Short bounces only: no press.
    for (int i = 0; i < 10; i++) begin
      rot_center = 1'b1;
      repeat ($urandom_range(1, DB - 5)) @(negedge clk);
      rot_center = 1'b0;
      repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    repeat (2 * DB) @(negedge clk);
    check(n_press == 0, "bounce shorter than debounce ignored");
    // Real presses.
    for (int i = 0; i < 5; i++) begin
      repeat (4) begin
        rot_center = ~rot_center;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      rot_center = 1'b1;
      t_settle = cyc;
      repeat (3 * DB) @(negedge clk);
      check(n_press == i + 1, $sformatf("press %0d counted once", i));
      check(press_cyc - t_settle == DB + 3, $sformatf("press latency %0d", press_cyc - t_settle));
      rot_center = 1'b0;
      repeat (3 * DB) @(negedge clk);
      check(n_press == i + 1, "release gives no press");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
