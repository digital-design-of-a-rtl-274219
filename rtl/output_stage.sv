// Output stage of the repeater: takes the 12 MS/s signal centred on
// 3 MHz back up to a 96 MS/s signal centred on fc.
//
//   s --> polyphase interpolator by 8, 972 taps (8 x 122)   12 -> 96 MS/s
//     --> mixer (s cos(2 pi fi t), fi = fc - 3 MHz, CORDIC DDS)
//     --> image-reject band-pass, 1068 taps, symmetric (534 multipliers):
//         a 3.14 MHz low-pass prototype shifted to fc, which keeps the
//         wanted sum frequency fi + 3 MHz = fc and removes fi - 3 MHz
//     --> gain correction (Q8.8 factor `gain`)
//
// Block order, factors, tap counts and the carrier frequency follow the
// document.  Clocking is this design's choice: one clock at 96 MHz; the
// interpolator pulls an input (in_valid && in_ready) at most once every
// 8 clocks and then produces one sample per clock, which the mixer, DDS,
// band-pass and gain stage process on that strobe.  y_valid is high on
// every clock once the input keeps pace, at 96 MS/s.
//
// Coefficients: bank 0 interpolator h[0..971], bank 1 band-pass half
// h[0..533].  Carrier: fi = ftw / 2^32 * 96 MHz.
module output_stage (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  dvbt_pkg::out_bank_e      coef_bank,
  input  logic [10:0]              coef_addr,
  input  dvbt_pkg::coef_t          coef_data,
  input  dvbt_pkg::phase_t         ftw,
  input  logic [dvbt_pkg::GAIN_W-1:0] gain,
  input  logic                     s_valid,
  output logic                     s_ready,
  input  dvbt_pkg::sample_t        s,
  output logic                     y_valid,
  output dvbt_pkg::sample_t        y
);
  import dvbt_pkg::*;

  logic    int_v, mix_v, bpf_v;
  sample_t int_y, mix_y, bpf_y;
  logic [2:0] int_ph;
  sample_t carrier, carrier_q;

  polyphase_interpolator #(.L(OUT_INTERP), .NTAPS(INT8_TAPS), .SHIFT(INT8_SHIFT)) u_int8 (
    .clk, .rst_n,
    .coef_we(coef_we && coef_bank == BANK_INT8), .coef_addr(coef_addr[9:0]),
    .coef_data,
    .in_valid(s_valid), .in_ready(s_ready), .x(s),
    .out_valid(int_v), .out_phase(int_ph), .y(int_y)
  );

  cordic_dds #(.PHASE_W(PHASE_W), .OUT_W(SAMPLE_W), .ITER(16)) u_dds (
    .clk, .rst_n, .en(int_v), .ftw,
    .cos_o(carrier), .sin_o(carrier_q)
  );

  mixer #(.C_W(SAMPLE_W)) u_mix (
    .clk, .rst_n, .in_valid(int_v), .x(int_y), .carrier,
    .out_valid(mix_v), .y(mix_y)
  );

  fir_symmetric #(.NTAPS(BPF_TAPS), .SHIFT(BPF_SHIFT)) u_bpf (
    .clk, .rst_n,
    .coef_we(coef_we && coef_bank == BANK_BPF), .coef_addr(coef_addr[9:0]),
    .coef_data,
    .in_valid(mix_v), .x(mix_y), .out_valid(bpf_v), .y(bpf_y)
  );

  gain_correction u_gain (
    .clk, .rst_n, .in_valid(bpf_v), .x(bpf_y), .gain,
    .out_valid(y_valid), .y
  );

endmodule
