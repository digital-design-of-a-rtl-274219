// Polyphase interpolator by L.
//
// The prototype low-pass h[0..NTAPS-1] (designed at the output rate, with
// a pass-band gain of L) is split into L components
//   e_p[j] = h[j*L + p],  j = 0..K-1,  K = ceil(NTAPS/L)
// (taps past NTAPS are zero).  Every component filters the same input
// delay line and a commutator takes their outputs in turn:
//   y[n*L + p] = sum_j e_p[j] * x[n-j].
// Since only one component is needed per output sample, the K multipliers
// are shared: in the p-th clock after an input the coefficient bank p is
// applied to the delay line.  This is the document's structure (2
// components of 26 taps for the 51-tap input filter, 8 components of 122
// taps for the 972-tap output filter); the sharing, the handshake and the
// run-time coefficient load are this design's choices.
//
// Interface: address n of coef_we/coef_addr/coef_data holds h[n]; all
// coefficients reset to 0.  An input is taken when in_valid && in_ready.
// in_ready is high when idle and in the clock that produces the last
// phase, so inputs may arrive every L clocks and the output is then a
// continuous stream.  y = round(acc / 2^SHIFT), saturated.
//
// Timing: the outputs for phases 0..L-1 of an input taken in clock c
// appear with out_valid in clocks c+2 .. c+L+1; out_phase tells which.
module polyphase_interpolator #(
  parameter int unsigned L     = dvbt_pkg::IN_INTERP,
  parameter int unsigned NTAPS = dvbt_pkg::INT2_TAPS,
  parameter int unsigned SHIFT = dvbt_pkg::INT2_SHIFT,
  localparam int unsigned K    = (NTAPS + L - 1) / L,
  localparam int unsigned AW   = $clog2(L * K),
  localparam int unsigned PW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  coef_we,
  input  logic [AW-1:0]         coef_addr,
  input  dvbt_pkg::coef_t       coef_data,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  dvbt_pkg::sample_t     x,
  output logic                  out_valid,
  output logic [PW-1:0]         out_phase,
  output dvbt_pkg::sample_t     y
);
  import dvbt_pkg::*;

  localparam int unsigned ACC_W = SAMPLE_W + COEF_W + $clog2(K + 1);

  coef_t   coef [L*K];
  sample_t dl   [K];
  logic          busy;
  logic [PW-1:0] ph;
  logic          accept;

  assign in_ready = !busy || (ph == PW'(L - 1));
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(L*K); n++) coef[n] <= '0;
    end else if (coef_we && (int'(coef_addr) < int'(NTAPS))) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(K); j++) dl[j] <= '0;
    end else if (accept) begin
      dl[0] <= x;
      for (int j = 1; j < int'(K); j++) dl[j] <= dl[j-1];
    end
  end

  // Polyphase component `ph` applied to the delay line.
  logic signed [ACC_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int j = 0; j < int'(K); j++)
      acc = acc + ACC_W'(coef[j*int'(L) + int'(ph)] * dl[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      ph        <= '0;
      out_valid <= 1'b0;
      out_phase <= '0;
      y         <= '0;
    end else begin
      out_valid <= busy;
      if (busy) begin
        y         <= round_shift(64'(acc), SHIFT);
        out_phase <= ph;
      end
      if (accept) begin
        busy <= 1'b1;
        ph   <= '0;
      end else if (busy) begin
        if (ph == PW'(L - 1)) busy <= 1'b0;
        else                  ph   <= ph + 1'b1;
      end
    end
  end

endmodule
