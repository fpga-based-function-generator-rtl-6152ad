// sine_rom_tb: checks the one-period sine table.
//
// Reads every address and compares with round(128 + 127*sin(2*pi*i/256))
// computed here, checks the odd symmetry t[i] + t[i+128] = 256, the peaks
// (t[64] = 255, t[192] = 1, t[0] = 128), the one-cycle read latency and that
// the output holds while rd_en is low.
module sine_rom_tb;
  localparam int AW = 8;
  localparam int DW = 8;
  localparam int N  = 2 ** AW;

  logic          clk = 1'b0;
  logic          rd_en;
  logic [AW-1:0] addr;
  logic [DW-1:0] data;
  int            checks = 0, failures = 0;
  int            got [N];

  sine_rom #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .rd_en, .addr, .data);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 1'b0;
    addr  = '0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      real e;
      rd_en = 1'b1;
      addr  = AW'(i);
      @(posedge clk);
      #1;
      got[i] = int'(data);
      e = 128.0 + 127.0 * $sin(2.0 * 3.14159265358979 * i / N);
      check(int'(data) == int'($floor(e + 0.5)),
            $sformatf("addr %0d got %0d expected %0d", i, data, int'($floor(e + 0.5))));
      @(negedge clk);
    end
    for (int i = 0; i < N / 2; i++)
      check(got[i] + got[i + N / 2] == 256, $sformatf("symmetry at %0d", i));
    check(got[0] == 128 && got[N / 4] == 255 && got[3 * N / 4] == 1, "peaks and zero");
    // Read latency and hold.
    addr  = 8'd64;
    rd_en = 1'b1;
    @(posedge clk);
    #1 check(data == 8'd255, "one-cycle latency");
    @(negedge clk);
    rd_en = 1'b0;
    addr  = 8'd192;
    @(posedge clk);
    #1 check(data == 8'd255, "hold while rd_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
