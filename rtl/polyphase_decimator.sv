// Polyphase decimator by M.
//
// The prototype low-pass h[0..NTAPS-1] is split into M components
//   e_k[j] = h[j*M + k],  j = 0..K-1,  K = ceil(NTAPS/M)
// (taps past NTAPS are zero).  A commutator deals the input samples to
// the components: component k sees x[m*M - k], so that
//   y[m] = sum_k sum_j e_k[j] * x[(m-j)*M - k] = sum_n h[n] * x[m*M - n],
// and the component outputs are added.  Only one component receives a
// sample per clock, so one set of K multipliers is shared: each arriving
// sample shifts into its component's own delay line, that component's
// partial sum is added to an accumulator, and after M samples the sum is
// the output.  The 15 components and their adder follow the document
// (a 256-tap filter decimating by 15); the sharing, the commutator start
// and the run-time coefficient load are this design's choices.
//
// Interface: address n of coef_we/coef_addr/coef_data holds h[n]; all
// coefficients reset to 0.  One sample may enter per clock.  Counting the
// samples from 0 after reset, output m uses samples up to index
// m*M + M-1, i.e. y[m] = sum_n h[n] * x[m*M + M-1 - n].
// y = round(sum / 2^SHIFT), saturated.
//
// Timing: `y`/`out_valid` appear one clock after the M-th sample of a
// group.
module polyphase_decimator #(
  parameter int unsigned M     = dvbt_pkg::IN_DECIM,
  parameter int unsigned NTAPS = dvbt_pkg::DEC15_TAPS,
  parameter int unsigned SHIFT = dvbt_pkg::DEC15_SHIFT,
  localparam int unsigned K    = (NTAPS + M - 1) / M,
  localparam int unsigned AW   = $clog2(M * K),
  localparam int unsigned BW   = (M > 1) ? $clog2(M) : 1
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

  localparam int unsigned ACC_W = SAMPLE_W + COEF_W + $clog2(M * K + 1);

  initial assert (K >= 2) else $error("decimator needs at least 2 taps per component");

  coef_t   coef [M*K];
  sample_t bd   [M][K-1];          // per-component delay lines
  logic [BW-1:0] br;               // commutator position
  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(M*K); n++) coef[n] <= '0;
    end else if (coef_we && (int'(coef_addr) < int'(NTAPS))) begin
      coef[coef_addr] <= coef_data;
    end
  end

  // Partial sum of component `br` with the arriving sample.
  logic signed [ACC_W-1:0] part, total;
  always_comb begin
    part = ACC_W'(coef[int'(br)] * x);
    for (int j = 1; j < int'(K); j++)
      part = part + ACC_W'(coef[j*int'(M) + int'(br)] * bd[br][j-1]);
    total = ((br == BW'(M - 1)) ? '0 : acc) + part;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(M); k++)
        for (int j = 0; j < int'(K) - 1; j++) bd[k][j] <= '0;
      br        <= BW'(M - 1);
      acc       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        bd[br][0] <= x;
        for (int j = 1; j < int'(K) - 1; j++) bd[br][j] <= bd[br][j-1];
        acc <= total;
        if (br == '0) begin
          br        <= BW'(M - 1);
          y         <= round_shift(64'(total), SHIFT);
          out_valid <= 1'b1;
        end else begin
          br <= br - 1'b1;
        end
      end
    end
  end

endmodule
