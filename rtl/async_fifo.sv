// Dual-clock FIFO carrying the 12 MS/s baseband stream from the input
// stage clock (180 MHz) to the output stage clock (96 MHz).
//
// Classic Gray-code design: binary read and write pointers one bit wider
// than the address, their Gray images crossed into the other domain by
// two flip-flops, full and empty derived from the synchronised pointers.
// The read port is first-word-fall-through: rdata shows the oldest word
// whenever empty is low, and rd_en pops it.  A write while full is
// dropped and raises `overflow` for one write clock.  `rlevel` is the
// number of words the reader can see (it lags the writer by the
// synchroniser).  The document feeds
// the input stage output straight into the output stage and does not say
// how the two sample clocks are related; this crossing is this design's
// choice.
//
// Timing: a word written in write clock c is visible at the read side
// after two to three read clocks (synchroniser latency).
module async_fifo #(
  parameter int unsigned DW = dvbt_pkg::SAMPLE_W,
  parameter int unsigned AW = 4                 // depth 2^AW
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic          overflow,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   rlevel         // words held, as seen by the reader
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write domain.
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      overflow <= wr_en && full;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  // Read domain.
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + 1'b1;
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rlevel = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

  a_no_underrun: assert property (@(posedge rclk) !(rd_en && empty))
    else $error("async_fifo: read while empty");

endmodule
