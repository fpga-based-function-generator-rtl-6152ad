// interp_filter: digital interpolation filter.
//
// Raises the sample rate by L = 2**LOG2_L so the DAC is updated more often
// than the engine produces samples. It is a linear interpolator (a first-order
// hold): with x[n-1] and x[n] the last two input samples, the k-th output
// after x[n] arrives is x[n-1] + (x[n] - x[n-1]) * k / L, k = 0..L-1,
// rounded toward minus infinity. The original design asks for interpolation to raise
// the effective sample rate; the linear kernel is this implementation's
// choice as the simplest filter that does it.
//
// Interface: in_valid/in_sample at the input rate; out_tick at L times that
// rate, each tick produces one out_valid/out_sample a cycle later. An input
// resets k to 0, so input samples must arrive between output ticks (the
// engine tick and every L-th output tick come from one sample clock).
// Latency: one input sample period plus one cycle.
module interp_filter #(
  parameter int unsigned W      = 8,
  parameter int unsigned LOG2_L = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_sample,
  input  logic         out_tick,
  output logic         out_valid,
  output logic [W-1:0] out_sample
);

  localparam int unsigned KW = (LOG2_L == 0) ? 1 : LOG2_L;

  logic [W-1:0]            prev, cur;
  logic [KW-1:0]           k;
  logic signed [W:0]       diff;
  logic signed [W+KW+1:0]  step;
  logic signed [W+KW+1:0]  y;

  always_comb begin
    diff = $signed({1'b0, cur}) - $signed({1'b0, prev});
    step = (W+KW+2)'(diff) * $signed({1'b0, k});
    y    = $signed((W+KW+2)'({1'b0, prev})) + (step >>> LOG2_L);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= W'(2 ** (W - 1));
      cur        <= W'(2 ** (W - 1));
      k          <= '0;
      out_valid  <= 1'b0;
      out_sample <= W'(2 ** (W - 1));
    end else begin
      out_valid <= out_tick;
      if (out_tick) begin
        out_sample <= y[W-1:0];
        k          <= (LOG2_L == 0) ? '0 : k + 1'b1;
      end
      if (in_valid) begin
        prev <= cur;
        cur  <= in_sample;
        k    <= '0;
      end
    end
  end

endmodule
