// dac_spi_tb: checks the serial DAC interface against a DAC model.
//
// Sends random samples and checks, through the behavioural DAC model, that
// each arrives as a 24-bit write-and-update word to all channels with code
// {sample, 0000}, that the word takes 50 cycles from start to done, that
// SCK stays low while CS is high, that the SCK half period is one cycle, and
// that starts while busy are ignored.
module dac_spi_tb;
  logic       clk = 1'b0;
  logic       rst_n, start, busy, done;
  logic [7:0] sample;
  logic       spi_sck, spi_mosi, dac_cs_n, dac_clr_n;
  logic [11:0] code_a, code_d;
  int          updates, bad_words;
  logic [3:0]  last_cmd, last_addr;
  real         vout;
  int          checks = 0, failures = 0;

  dac_spi dut (.clk, .rst_n, .start, .sample, .busy, .done, .spi_sck, .spi_mosi, .dac_cs_n, .dac_clr_n);
  ltc2624_model u_dac (.sck(spi_sck), .mosi(spi_mosi), .cs_n(dac_cs_n), .clr_n(dac_clr_n),
    .code_a, .code_d, .updates, .bad_words, .last_cmd, .last_addr, .vout);

  always #5 clk = ~clk;

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

  // SCK high only while selected; SCK toggles no faster than every cycle.
  int sck_bad = 0;
  always @(negedge clk) if (rst_n && dac_cs_n && spi_sck) sck_bad++;

  initial begin
    rst_n = 1'b0; start = 1'b0; sample = '0;
    repeat (3) @(negedge clk);
    check(!dac_clr_n, "CLR low in reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(dac_clr_n && dac_cs_n && !busy, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      int cyc, u0;
      logic [7:0] s;
      s = (i == 0) ? 8'hFF : (i == 1) ? 8'h00 : 8'($urandom());
      u0 = updates;
      sample = s;
      start  = 1'b1;
      @(negedge clk);
      start  = 1'b0;
      sample = ~s;  // sample is taken at start only
      cyc = 1;
      check(busy && !dac_cs_n, "busy and selected after start");
      // A second start while busy must be ignored.
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc++;
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 200) break;
      end
      check(cyc == 50, $sformatf("word took %0d cycles, expected 50", cyc));
      check(updates == u0 + 1, "one DAC update per word");
      check(code_a == {s, 4'b0000} && code_d == {s, 4'b0000},
            $sformatf("DAC code %h expected %h", code_a, {s, 4'b0000}));
      check(last_cmd == 4'b0011 && last_addr == 4'b1111, "command and address");
      @(negedge clk);
      check(!busy, "idle after done");
      check(vout > 3.3 * (real'(s) * 16.0 - 0.5) / 4096.0 && vout < 3.3 * (real'(s) * 16.0 + 0.5) / 4096.0,
            "model output voltage");
    end
    check(bad_words == 0 && sck_bad == 0, $sformatf("bad words %0d, SCK-without-CS %0d", bad_words, sck_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
