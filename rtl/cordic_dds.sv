// CORDIC direct digital synthesizer: produces the local carrier
// cos(2*pi*fi*t) (and its quadrature sin) for the mixers of the repeater.
//
// A PHASE_W-bit phase accumulator advances by the frequency tuning word
// `ftw` once per sample strobe `en`, so fi = ftw / 2^PHASE_W * fs where fs
// is the rate of `en`.  The phase is folded into [-pi/2, pi/2) by a
// rotation of pi (remembered and undone at the output) and fed to an
// ITER-stage pipelined CORDIC in rotation mode.  The starting vector is
// (A/K, 0), K being the CORDIC gain, so the amplitude A is full scale;
// the x/y words carry 4 extra fraction bits, rounded off at the output.
// The CORDIC rotation is the documented way of generating the carrier; the
// pipeline, the widths and the folding are this design's choices, and the
// gain and phase correction that goes with the document's DDS is not
// described there and is left out.
//
// Timing: every register advances only on `en`.  After the n-th strobe,
// `cos_o` holds cos(2*pi*(n-LATENCY)*ftw/2^PHASE_W), LATENCY = ITER+2
// strobes; it is 0 while the pipeline fills after reset.
module cordic_dds #(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned OUT_W   = 16,
  parameter int unsigned ITER    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,      // one strobe per output sample
  input  logic [PHASE_W-1:0]       ftw,     // frequency tuning word
  output logic signed [OUT_W-1:0]  cos_o,
  output logic signed [OUT_W-1:0]  sin_o
);
  import dvbt_pkg::*;

  localparam int unsigned G  = 4;                  // fraction guard bits
  localparam int unsigned XW = OUT_W + 2 + G;      // plus growth bits
  localparam int unsigned ZW = 32;                 // angle word, 2^32 = 2*pi
  localparam logic signed [XW-1:0] X_INIT =
      XW'(longint'(real'((2 ** (OUT_W - 1)) - 1) * real'(2 ** G) * 0.6072529350088813));

  initial begin
    assert (ITER <= CORDIC_MAX_ITER) else $error("ITER exceeds atan table");
    assert (PHASE_W >= ZW) else $error("PHASE_W must be at least 32");
  end

  logic [PHASE_W-1:0] acc;
  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic                 ng [ITER+1];

  // Phase accumulator and quadrant folding.
  logic [ZW-1:0] ph;
  logic          fold;
  always_comb begin
    ph   = acc[PHASE_W-1 -: ZW];
    fold = ph[ZW-1] ^ ph[ZW-2];          // phase in [pi/2, 3pi/2)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cos_o <= '0;
      sin_o <= '0;
      for (int i = 0; i <= ITER; i++) begin
        xs[i] <= '0;
        ys[i] <= '0;
        zs[i] <= '0;
        ng[i] <= 1'b0;
      end
    end else if (en) begin
      acc   <= acc + ftw;
      xs[0] <= X_INIT;
      ys[0] <= '0;
      zs[0] <= fold ? $signed(ph + (ZW'(1) << (ZW-1))) : $signed(ph);
      ng[0] <= fold;
      for (int i = 0; i < ITER; i++) begin
        if (!zs[i][ZW-1]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(CORDIC_ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(CORDIC_ATAN[i]);
        end
        ng[i+1] <= ng[i];
      end
      cos_o <= OUT_W'(round_shift(ng[ITER] ? -64'(xs[ITER]) : 64'(xs[ITER]), G));
      sin_o <= OUT_W'(round_shift(ng[ITER] ? -64'(ys[ITER]) : 64'(ys[ITER]), G));
    end
  end

endmodule
