// Helpers shared by the testbenches: integer reference arithmetic,
// windowed-sinc filter design at run time, and tone measurement.
//
// The reference arithmetic mirrors the datapath's number format (round
// half up after an arithmetic shift, then saturation to 16 bits) but is
// written independently of the design's package.  The filters are
// Hamming-windowed sinc designs: low-pass h[n] = g * 2*fc/fs *
// sinc(2*fc/fs*(n-(N-1)/2)) * w[n], quantised to Q1.17 (or the given number
// of fraction bits).  A band-pass is that low-pass times
// 2*cos(2*pi*f0/fs*(n-(N-1)/2)).
package tb_util_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint ref_sat16(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint ref_round(input longint v, input int sh);
    if (sh == 0) return ref_sat16(v);
    return ref_sat16((v + (longint'(1) <<< (sh-1))) >>> sh);
  endfunction

  // Hamming-windowed sinc low-pass, gain g, cutoff fcut (same units as
  // fs), optionally moved to centre frequency f0 (0 for a low-pass).
  function automatic void design_fir(ref int h[], input int n, input real fs,
                                     input real fcut, input real g,
                                     input real f0, input int frac);
    real c, t, v, w;
    h = new[n];
    for (int k = 0; k < n; k++) begin
      t = real'(k) - real'(n - 1) / 2.0;
      c = 2.0 * fcut / fs;
      if (t == 0.0) v = c;
      else          v = $sin(PI * c * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(n - 1));
      v = g * v * w;
      if (f0 != 0.0) v = v * 2.0 * $cos(2.0 * PI * f0 / fs * t);
      h[k] = int'(v * real'(longint'(1) << frac));
    end
  endfunction

  // Signal-to-rest ratio of a tone at f (cycles per sample) in y[]:
  // amplitude from a correlation, the rest is all other power.
  function automatic void tone_measure(ref int y[$], input int start, input int len,
                                       input real f, output real amp, output real snr_db);
    real si, sq, tot, pt, pr;
    si = 0.0; sq = 0.0; tot = 0.0;
    for (int i = 0; i < len; i++) begin
      si  += real'(y[start+i]) * $cos(2.0 * PI * f * real'(i));
      sq  += real'(y[start+i]) * $sin(2.0 * PI * f * real'(i));
      tot += real'(y[start+i]) * real'(y[start+i]);
    end
    amp = 2.0 * $sqrt(si*si + sq*sq) / real'(len);
    pt  = amp * amp / 2.0;
    pr  = tot / real'(len) - pt;
    if (pr < 1e-9) pr = 1e-9;
    snr_db = 10.0 * $log10(pt / pr);
  endfunction

endpackage
