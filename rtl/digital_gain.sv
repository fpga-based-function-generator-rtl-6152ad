// digital_gain: amplifies or attenuates the samples before conversion.
//
// Lets the amplitude be changed without reloading a waveform. The sample is
// offset binary around mid-scale 2**(W-1); the gain stage removes the offset,
// multiplies by an unsigned gain with FRAC_W fraction bits (default 8-bit
// gain, 6 fraction bits: 64 is unity, 0..255 covers 0 to 3.98), rounds half
// up, saturates to the signed sample range and restores the offset. The
// fixed-point format, rounding and saturation are this implementation's
// choices; the original design specifies only the function.
//
// Timing: one register stage, out_valid follows in_valid by one cycle.
module digital_gain #(
  parameter int unsigned W      = 8,
  parameter int unsigned GAIN_W = 8,
  parameter int unsigned FRAC_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      in_sample,
  input  logic [GAIN_W-1:0] gain,
  output logic              out_valid,
  output logic [W-1:0]      out_sample,
  output logic              clipped     // this output was saturated
);

  localparam int unsigned PW = W + 1 + GAIN_W + 1;
  localparam logic signed [PW-1:0] MAXV = PW'((2 ** (W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(2 ** (W - 1));

  logic signed [W:0]      centered;
  logic signed [PW-1:0]   prod, scaled;
  logic signed [W-1:0]    sat;
  logic                   sat_hit;

  always_comb begin
    centered = $signed({1'b0, in_sample}) - $signed((W+1)'(2 ** (W - 1)));
    prod     = PW'(centered) * $signed({1'b0, gain});
    scaled   = (prod + PW'(2 ** (FRAC_W - 1))) >>> FRAC_W;
    sat_hit  = 1'b1;
    if (scaled > MAXV)      sat = MAXV[W-1:0];
    else if (scaled < MINV) sat = MINV[W-1:0];
    else begin
      sat     = scaled[W-1:0];
      sat_hit = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= W'(2 ** (W - 1));
      clipped    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sample <= {~sat[W-1], sat[W-2:0]};
        clipped    <= sat_hit;
      end
    end
  end

endmodule
