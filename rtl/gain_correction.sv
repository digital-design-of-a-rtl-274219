// Output gain correction: scales the band-pass filtered output by a
// programmable factor to compensate the gain lost along the chain.
//
// y = round(x * gain / 2^GAIN_FRAC), saturated.  `gain` is unsigned
// Q8.8, so factors from 1/256 up to 255.996 are available; this covers
// the compensation factor of about 219.6 (1/0.0045543) quoted for the
// floating-point model as well as the small factor a fixed-point chain
// with unit-gain filters needs.  The factor and its purpose follow the
// document; the word format is this design's choice.
//
// Timing: one clock from `in_valid` to `out_valid`.
module gain_correction (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  dvbt_pkg::sample_t                      x,
  input  logic [dvbt_pkg::GAIN_W-1:0]            gain,
  output logic                                   out_valid,
  output dvbt_pkg::sample_t                      y
);
  import dvbt_pkg::*;

  logic signed [SAMPLE_W+GAIN_W:0] prod;
  assign prod = x * $signed({1'b0, gain});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= round_shift(64'(prod), GAIN_FRAC);
    end
  end

endmodule
