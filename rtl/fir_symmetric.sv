// Linear-phase FIR filter with even-symmetric coefficients, folded so that
// each multiplier serves a pair of taps: h[k] = h[NTAPS-1-k], and
//   y[n] = sum_{k<NH} h[k] * (x[n-k] + x[n-(NTAPS-1-k)]),  NH = ceil(NTAPS/2)
// (for odd NTAPS the centre tap is not doubled).  It serves as the input
// image-reject low-pass (128 taps, 64 multipliers) and as the output
// image-reject band-pass (1068 taps, 534 multipliers): the band-pass is a
// low-pass prototype multiplied by a cosine centred on the middle tap, so
// it stays symmetric.  The folded structure and the tap counts follow the
// document; the coefficients themselves come from its filter design runs
// and are therefore loaded at run time.
//
// Interface: the NH distinct coefficients are written through
// coef_we/coef_addr/coef_data (address k holds h[k]); all reset to 0.
// One sample may enter per clock on `in_valid`.  The accumulator is
// full precision; y = round(acc / 2^SHIFT), saturated.
//
// Timing: the sample is shifted into the delay line on the `in_valid`
// edge, the next clock sums the products, and `y`/`out_valid` appear two
// clocks after `in_valid`.  The whole sum is formed in one clock; a faster
// implementation would pipeline the adder tree.
module fir_symmetric #(
  parameter int unsigned NTAPS = dvbt_pkg::LPF_TAPS,
  parameter int unsigned SHIFT = dvbt_pkg::LPF_SHIFT,
  localparam int unsigned NH   = (NTAPS + 1) / 2,
  localparam int unsigned AW   = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  coef_we,
  input  logic [AW-1:0]         coef_addr,
  input  dvbt_pkg::coef_t       coef_data,
  input  logic                  in_valid,
  input  dvbt_pkg::sample_t     x,
  output logic                  out_valid,
  output dvbt_pkg::sample_t     y
);
  import dvbt_pkg::*;

  localparam int unsigned ACC_W = SAMPLE_W + 1 + COEF_W + $clog2(NH + 1);

  coef_t   coef [NH];
  sample_t dl   [NTAPS];
  logic    v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NH); k++) coef[k] <= '0;
    end else if (coef_we && (int'(coef_addr) < int'(NH))) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAPS); k++) dl[k] <= '0;
    end else if (in_valid) begin
      dl[0] <= x;
      for (int k = 1; k < int'(NTAPS); k++) dl[k] <= dl[k-1];
    end
  end

  logic signed [ACC_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(NH); k++) begin
      if ((NTAPS % 2 == 1) && (k == int'(NH) - 1))
        acc = acc + ACC_W'(coef[k] * dl[k]);
      else
        acc = acc + ACC_W'(coef[k] * (SAMPLE_W+1)'($signed(dl[k]) + $signed(dl[NTAPS-1-k])));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (v1) y <= round_shift(64'(acc), SHIFT);
    end
  end

endmodule
