// Shared widths, rates and constants of the DVB-T repeater datapath.
//
// All samples are real, two's complement, SAMPLE_W bits.  Filter
// coefficients are COEF_W-bit signed values; each filter instance scales
// its accumulator back to a sample by an arithmetic right shift with
// round-half-up and saturation.  The rates, decimation and interpolation
// factors and tap counts are the ones the repeater is specified with; the
// word widths and the coefficient formats are this design's choice.
package dvbt_pkg;

  localparam int unsigned SAMPLE_W = 16;  // data path word
  localparam int unsigned COEF_W   = 18;  // filter coefficient word
  localparam int unsigned PHASE_W  = 32;  // DDS phase accumulator

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic        [PHASE_W-1:0]  phase_t;

  // Sample rates in MS/s along the chain.
  localparam int unsigned FS_IN_MSPS   = 90;   // ADC rate at the input stage
  localparam int unsigned FS_UP_MSPS   = 180;  // after the interpolator by 2
  localparam int unsigned FS_BB_MSPS   = 12;   // after the decimator by 15
  localparam int unsigned FS_OUT_MSPS  = 96;   // after the interpolator by 8

  // Rate change factors.
  localparam int unsigned IN_INTERP  = 2;
  localparam int unsigned IN_DECIM   = 15;
  localparam int unsigned OUT_INTERP = 8;

  // Filter lengths (taps).
  localparam int unsigned LPF_TAPS   = 128;   // input image-reject low-pass
  localparam int unsigned INT2_TAPS  = 51;    // input interpolation filter
  localparam int unsigned DEC15_TAPS = 256;   // input decimation filter
  localparam int unsigned INT8_TAPS  = 972;   // output interpolation filter
  localparam int unsigned BPF_TAPS   = 1068;  // output image-reject band-pass

  // Right shift that turns each filter's accumulator back into a sample:
  // coefficients are Q1.17 except the interpolator by 8, whose prototype
  // carries the gain of 8 and so needs Q2.16.
  localparam int unsigned LPF_SHIFT   = 17;
  localparam int unsigned INT2_SHIFT  = 17;
  localparam int unsigned DEC15_SHIFT = 17;
  localparam int unsigned INT8_SHIFT  = 16;
  localparam int unsigned BPF_SHIFT   = 17;

  // Carrier tuning words for fi = fc - 3 MHz with fc = 35 MHz:
  // FTW = round(fi / fs * 2^32).
  localparam phase_t FTW_IN_DEFAULT  = 32'd1527099483;  // 32 MHz at 90 MS/s
  localparam phase_t FTW_OUT_DEFAULT = 32'd1431655765;  // 32 MHz at 96 MS/s

  // Gain correction word: unsigned Q8.8.
  localparam int unsigned GAIN_W    = 16;
  localparam int unsigned GAIN_FRAC = 8;

  // CORDIC arctangent table, atan(2^-i) in phase units where 2^32 is a
  // full turn: round(atan(2^-i) / (2*pi) * 2^32).
  localparam int unsigned CORDIC_MAX_ITER = 20;
  localparam logic [31:0] CORDIC_ATAN [CORDIC_MAX_ITER] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304
  };

  // Coefficient bank select on the coefficient load buses.
  typedef enum logic [1:0] {
    BANK_LPF   = 2'd0,
    BANK_INT2  = 2'd1,
    BANK_DEC15 = 2'd2
  } in_bank_e;

  typedef enum logic [0:0] {
    BANK_INT8 = 1'b0,
    BANK_BPF  = 1'b1
  } out_bank_e;

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (SAMPLE_W-1)) - 1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (SAMPLE_W-1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

  // Round half up and shift right, then saturate.
  function automatic sample_t round_shift(input logic signed [63:0] v,
                                          input int unsigned sh);
    logic signed [63:0] r;
    if (sh == 0) r = v;
    else         r = (v + (64'sd1 <<< (sh-1))) >>> sh;
    return sat_sample(r);
  endfunction

endpackage
