// Real mixer: multiplies each sample by the local carrier from the DDS.
//
// y = round(x * c / 2^(C_W-1)), saturated to a sample, so a full-scale
// carrier has unit gain.  The document specifies a real multiplier fed by
// a DDS; the rounding, saturation and the one register stage are this
// design's choices.
//
// Timing: `y`/`out_valid` appear one clock after `in_valid`; the carrier
// is sampled in the same cycle as `x`.
module mixer #(
  parameter int unsigned C_W = 16        // carrier width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  dvbt_pkg::sample_t        x,
  input  logic signed [C_W-1:0]    carrier,
  output logic                     out_valid,
  output dvbt_pkg::sample_t        y
);
  import dvbt_pkg::*;

  logic signed [SAMPLE_W+C_W-1:0] prod;
  assign prod = x * carrier;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= round_shift(64'(prod), C_W - 1);
    end
  end

endmodule
