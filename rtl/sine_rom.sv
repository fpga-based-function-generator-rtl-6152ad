// sine_rom: onboard waveform memory holding one period of a sine.
//
// The generator only needs a single period of a waveform in memory because
// its output repeats; this ROM holds 2**ADDR_W samples of one sine period in
// offset binary, code(i) = round(2**(DATA_W-1) + (2**(DATA_W-1)-1) *
// sin(2*pi*i/2**ADDR_W)), so 0 reads mid-scale (128 for 8 bits) and the peaks
// are 255 and 1. The table is computed at elaboration, not loaded from a file.
// The 8-bit sample width follows the original design; the 256-entry depth is a
// choice of this implementation.
//
// Interface: rd_en/addr in, data out. Timing: synchronous read, data is
// valid the cycle after rd_en; data holds its value while rd_en is low.
module sine_rom #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;
  typedef logic [DATA_W-1:0] rom_t [DEPTH];

  function automatic rom_t make_table();
    rom_t t;
    real  mid, amp, v;
    mid = 2.0 ** (DATA_W - 1);
    amp = mid - 1.0;
    for (int i = 0; i < DEPTH; i++) begin
      v    = mid + amp * $sin(2.0 * 3.14159265358979 * i / DEPTH);
      t[i] = DATA_W'(int'($floor(v + 0.5)));
    end
    return t;
  endfunction

  localparam rom_t TABLE = make_table();

  always_ff @(posedge clk) begin
    if (rd_en) data <= TABLE[addr];
  end

endmodule
