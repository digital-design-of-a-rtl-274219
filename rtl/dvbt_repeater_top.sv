// DVB-T transposing repeater, digital part.
//
// The received channel, sampled at 90 MS/s on an IF around fc = 35..37
// MHz, is shifted to 3 MHz and brought to 12 MS/s by the input stage, the
// rate at which an automatic frequency control (AFC) block would work.
// The output stage raises the rate to 96 MS/s and moves the channel back
// to fc for the DAC.  Between them the 12 MS/s stream crosses from the
// input clock (clk_in, 180 MHz) to the output clock (clk_out, 96 MHz)
// through a dual-clock FIFO.
//
// The AFC itself is not part of this design: its input is brought out on
// afc_o_valid/afc_o and its output comes back on afc_i_valid/afc_i (in the
// clk_in domain).  With afc_bypass high the input stage feeds the output
// stage directly.  The two stages, their filters and carriers follow the
// document; the two clock domains, the FIFO, the AFC ports and the
// coefficient buses are this design's choices.
//
// Ports in the clk_in domain: input samples (x_valid on every second
// clock), input carrier word, coefficient bus of the input stage, AFC
// ports, status (in_overrun, fifo_overflow, both sticky).  Ports in the
// clk_out domain: output carrier word, gain, coefficient bus of the
// output stage, output samples (y_valid, up to one per clock), status
// fifo_underrun (sticky: the output stage wanted a sample and the FIFO
// was empty after it had started).  The output stage starts once the
// FIFO holds 8 of its 16 words.
module dvbt_repeater_top (
  input  logic                        clk_in,
  input  logic                        rst_in_n,
  input  logic                        clk_out,
  input  logic                        rst_out_n,
  // input stage, clk_in
  input  logic                        in_coef_we,
  input  dvbt_pkg::in_bank_e          in_coef_bank,
  input  logic [10:0]                 in_coef_addr,
  input  dvbt_pkg::coef_t             in_coef_data,
  input  dvbt_pkg::phase_t            ftw_in,
  input  logic                        x_valid,
  input  dvbt_pkg::sample_t           x,
  // AFC loop, clk_in
  output logic                        afc_o_valid,
  output dvbt_pkg::sample_t           afc_o,
  input  logic                        afc_bypass,
  input  logic                        afc_i_valid,
  input  dvbt_pkg::sample_t           afc_i,
  // output stage, clk_out
  input  logic                        out_coef_we,
  input  dvbt_pkg::out_bank_e         out_coef_bank,
  input  logic [10:0]                 out_coef_addr,
  input  dvbt_pkg::coef_t             out_coef_data,
  input  dvbt_pkg::phase_t            ftw_out,
  input  logic [dvbt_pkg::GAIN_W-1:0] gain,
  output logic                        y_valid,
  output dvbt_pkg::sample_t           y,
  // status
  output logic                        in_overrun,
  output logic                        fifo_overflow,
  output logic                        fifo_underrun
);
  import dvbt_pkg::*;

  logic    bb_valid;
  sample_t bb;

  input_stage u_in (
    .clk(clk_in), .rst_n(rst_in_n),
    .coef_we(in_coef_we), .coef_bank(in_coef_bank), .coef_addr(in_coef_addr),
    .coef_data(in_coef_data), .ftw(ftw_in),
    .x_valid, .x, .bb_valid, .bb, .overrun(in_overrun)
  );

  assign afc_o_valid = bb_valid;
  assign afc_o       = bb;

  localparam int unsigned FIFO_AW = 4;
  localparam int unsigned START_LEVEL = 2 ** (FIFO_AW - 1);

  logic    f_wr, f_full, f_ovf, f_empty, s_ready, s_valid;
  sample_t f_wdata, f_rdata;
  logic [FIFO_AW:0] f_level;

  assign f_wr    = afc_bypass ? bb_valid : afc_i_valid;
  assign f_wdata = afc_bypass ? bb       : afc_i;

  async_fifo #(.DW(SAMPLE_W), .AW(FIFO_AW)) u_fifo (
    .wclk(clk_in), .wrst_n(rst_in_n), .wr_en(f_wr), .wdata(f_wdata),
    .full(f_full), .overflow(f_ovf),
    .rclk(clk_out), .rrst_n(rst_out_n), .rd_en(s_valid && s_ready),
    .rdata(f_rdata), .empty(f_empty), .rlevel(f_level)
  );

  always_ff @(posedge clk_in or negedge rst_in_n) begin
    if (!rst_in_n)  fifo_overflow <= 1'b0;
    else if (f_ovf) fifo_overflow <= 1'b1;
  end

  // The output stage starts reading once the FIFO is half full, so the
  // small rate and phase differences between the clocks are absorbed.
  // Underrun: after that start, the interpolator is ready for the next
  // sample and the FIFO has none.
  logic started;
  assign s_valid = started && !f_empty;

  always_ff @(posedge clk_out or negedge rst_out_n) begin
    if (!rst_out_n) begin
      started       <= 1'b0;
      fifo_underrun <= 1'b0;
    end else begin
      if (f_level >= (FIFO_AW+1)'(START_LEVEL)) started       <= 1'b1;
      if (started && s_ready && f_empty)        fifo_underrun <= 1'b1;
    end
  end

  output_stage u_out (
    .clk(clk_out), .rst_n(rst_out_n),
    .coef_we(out_coef_we), .coef_bank(out_coef_bank), .coef_addr(out_coef_addr),
    .coef_data(out_coef_data), .ftw(ftw_out), .gain,
    .s_valid, .s_ready, .s(f_rdata),
    .y_valid, .y
  );

endmodule
