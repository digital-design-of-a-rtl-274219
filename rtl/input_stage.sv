// Input stage of the repeater: brings the 90 MS/s IF signal, centred on
// fc (35..37 MHz), down to a 12 MS/s signal centred on 3 MHz.
//
//   x --> mixer (x cos(2 pi fi t), fi = fc - 3 MHz, CORDIC DDS)
//     --> image-reject low-pass, 128 taps, symmetric (64 multipliers)
//     --> polyphase interpolator by 2, 51 taps (2 x 26)      90 -> 180 MS/s
//     --> polyphase decimator by 15, 256 taps (15 x 18)     180 -> 12 MS/s
//
// The block order, factors, tap counts and the carrier frequency follow
// the document.  Clocking is this design's choice: one clock at the
// 180 MS/s rate, with the 90 MS/s input arriving as a strobe `x_valid` on
// every second clock.  The mixer, DDS and low-pass run on that strobe, the
// interpolator then delivers one sample per clock and the decimator emits
// `bb_valid` once every 15 clocks.  An input sample that reaches the
// interpolator while it is still busy would be lost; `overrun` flags it
// (sticky until reset) and never rises while x_valid keeps at least two
// clocks apart.
//
// Coefficients are loaded through coef_we/coef_bank/coef_addr/coef_data
// (bank: 0 low-pass half h[0..63], 1 interpolator h[0..50], 2 decimator
// h[0..255]) and the carrier through ftw (fi = ftw / 2^32 * 90 MHz).
module input_stage (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  dvbt_pkg::in_bank_e       coef_bank,
  input  logic [10:0]              coef_addr,
  input  dvbt_pkg::coef_t          coef_data,
  input  dvbt_pkg::phase_t         ftw,
  input  logic                     x_valid,
  input  dvbt_pkg::sample_t        x,
  output logic                     bb_valid,
  output dvbt_pkg::sample_t        bb,
  output logic                     overrun
);
  import dvbt_pkg::*;

  sample_t carrier, carrier_q;
  logic    mix_v, lpf_v, int_v, int_rdy;
  sample_t mix_y, lpf_y, int_y;
  logic    int_ph;

  cordic_dds #(.PHASE_W(PHASE_W), .OUT_W(SAMPLE_W), .ITER(16)) u_dds (
    .clk, .rst_n, .en(x_valid), .ftw,
    .cos_o(carrier), .sin_o(carrier_q)
  );

  mixer #(.C_W(SAMPLE_W)) u_mix (
    .clk, .rst_n, .in_valid(x_valid), .x, .carrier,
    .out_valid(mix_v), .y(mix_y)
  );

  fir_symmetric #(.NTAPS(LPF_TAPS), .SHIFT(LPF_SHIFT)) u_lpf (
    .clk, .rst_n,
    .coef_we(coef_we && coef_bank == BANK_LPF), .coef_addr(coef_addr[5:0]),
    .coef_data,
    .in_valid(mix_v), .x(mix_y), .out_valid(lpf_v), .y(lpf_y)
  );

  polyphase_interpolator #(.L(IN_INTERP), .NTAPS(INT2_TAPS), .SHIFT(INT2_SHIFT)) u_int2 (
    .clk, .rst_n,
    .coef_we(coef_we && coef_bank == BANK_INT2), .coef_addr(coef_addr[5:0]),
    .coef_data,
    .in_valid(lpf_v), .in_ready(int_rdy), .x(lpf_y),
    .out_valid(int_v), .out_phase(int_ph), .y(int_y)
  );

  polyphase_decimator #(.M(IN_DECIM), .NTAPS(DEC15_TAPS), .SHIFT(DEC15_SHIFT)) u_dec15 (
    .clk, .rst_n,
    .coef_we(coef_we && coef_bank == BANK_DEC15), .coef_addr(coef_addr[8:0]),
    .coef_data,
    .in_valid(int_v), .x(int_y), .out_valid(bb_valid), .y(bb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 overrun <= 1'b0;
    else if (lpf_v && !int_rdy) overrun <= 1'b1;
  end

endmodule
