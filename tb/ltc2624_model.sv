// ltc2624_model: behavioural model of the serial quad 12-bit DAC on the
// board, used by the testbenches; not synthesizable logic.
//
// Shifts MOSI in on each rising SCK edge while CS is low. When CS rises
// after exactly 24 bits (or 32, the first 8 ignored) the word is decoded as
// command[23:20], address[19:16], data[15:4]. Command 4'b0011 (write and
// update) loads and updates the addressed channel, address 4'b1111 all four.
// vout is the channel A voltage for a 3.3 V reference. Words of another
// length are counted as bad and ignored; CLR low clears all channels.
module ltc2624_model #(
  parameter real VREF = 3.3
) (
  input  logic        sck,
  input  logic        mosi,
  input  logic        cs_n,
  input  logic        clr_n,
  output logic [11:0] code_a,
  output logic [11:0] code_d,
  output int          updates,
  output int          bad_words,
  output logic [3:0]  last_cmd,
  output logic [3:0]  last_addr,
  output real         vout
);

  logic [31:0] shreg;
  int          nbits;

  initial begin
    shreg = '0; nbits = 0; updates = 0; bad_words = 0;
    code_a = '0; code_d = '0; last_cmd = '0; last_addr = '0;
  end

  always @(negedge cs_n) nbits = 0;

  always @(posedge sck) begin
    if (!cs_n) begin
      shreg = {shreg[30:0], mosi};
      nbits++;
    end
  end

  always @(posedge cs_n) begin
    if (nbits == 24 || nbits == 32) begin
      last_cmd  = shreg[23:20];
      last_addr = shreg[19:16];
      if (shreg[23:20] == 4'b0011) begin
        if (shreg[19:16] == 4'b0000 || shreg[19:16] == 4'b1111) code_a = shreg[15:4];
        if (shreg[19:16] == 4'b0011 || shreg[19:16] == 4'b1111) code_d = shreg[15:4];
        updates++;
      end
    end else if (nbits != 0) begin
      bad_words++;
    end
  end

  always @(negedge clr_n) begin
    code_a = '0;
    code_d = '0;
  end

  always_comb vout = VREF * real'(code_a) / 4096.0;

endmodule
