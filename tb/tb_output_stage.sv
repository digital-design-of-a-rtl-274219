// Tone test of the output stage at its full size.  Filters are loaded with
// Hamming-windowed sinc designs meeting the specified band edges
// (interpolator 6.07 MHz at 96 MS/s with gain 8; band-pass: a 3.07 MHz
// low-pass moved to fc).  For each carrier fc of 35, 36 and 37 MHz a
// 3.4 MHz tone enters at 12 MS/s, the DDS is tuned to fi = fc - 3 MHz and
// the gain word is 2.0.  Checks:
//  * the 96 MS/s output is a tone at fc + 0.4 MHz with the input
//    amplitude (half lost in the mixer, doubled by the gain), within 3 %,
//    with all other power at least 35 dB lower;
//  * the mixer's difference product at fi - 3.4 MHz is at least 40 dB
//    below the wanted tone at the band-pass output;
//  * 8 outputs per input, and once running an output on every clock
//    while the producer pauses only when the interpolator holds it off.
module tb_output_stage;
  import tb_util_pkg::*;
  import dvbt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5208 clk = ~clk;       // 96 MHz (delays in ps)
  int checks = 0, failures = 0;

  logic        coef_we = 0;
  out_bank_e   coef_bank = BANK_INT8;
  logic [10:0] coef_addr = 0;
  coef_t       coef_data = 0;
  phase_t      ftw = 0;
  logic [15:0] gain = 16'd512;
  logic        s_valid = 0, s_ready, y_valid;
  sample_t     s = 0, y;

  output_stage dut (.clk, .rst_n, .coef_we, .coef_bank, .coef_addr, .coef_data, .ftw, .gain,
                    .s_valid, .s_ready, .s, .y_valid, .y);

  initial begin
    #5000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int yq [$], mixq [$];
  int n_in = 0, streak = 0, best = 0;
  always @(posedge clk) begin
    if (y_valid) begin
      yq.push_back(int'(y));
      streak++;
      if (streak > best) best = streak;
    end else streak = 0;
    if (dut.mix_v) mixq.push_back(int'(dut.mix_y));
    if (s_valid && s_ready) n_in++;
  end

  task automatic load(input out_bank_e b, ref int h[], input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      coef_we = 1; coef_bank = b; coef_addr = 11'(k); coef_data = 18'(h[k]);
    end
    @(negedge clk); coef_we = 0;
  endtask

  localparam real A = 8000.0;

  task automatic run_tone(input real fc);
    real fo, fi, amp, snr, a_bp, a_diff, dummy;
    int  m;
    int  bpq [$];
    fo = fc + 0.4;
    fi = fc - 3.0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    yq.delete(); mixq.delete(); n_in = 0; best = 0; streak = 0;
    ftw = phase_t'(longint'(fi / 96.0 * 4294967296.0 + 0.5));
    #1 rst_n = 1;
    begin
      int h[];
      design_fir(h, INT8_TAPS, 96.0, 6.07, 8.0, 0.0, 16); load(BANK_INT8, h, INT8_TAPS);
      design_fir(h, BPF_TAPS, 96.0, 3.07, 1.0, fc, 17);   load(BANK_BPF, h, BPF_TAPS / 2);
    end
    m = 0;
    while (yq.size() < 3600) begin
      @(negedge clk);
      s_valid = 1;
      s = sample_t'(int'(A * $cos(2.0 * PI * 3.4 / 12.0 * real'(m))));
      @(posedge clk);
      if (s_ready) m++;
    end
    @(negedge clk); s_valid = 0;
    repeat (10) @(posedge clk);
    tone_measure(yq, 2400, 960, fo / 96.0, amp, snr);
    $display("fc=%0.1f MHz: 96 MS/s output tone %0.1f MHz amplitude %0.1f (expected %0.1f), rest %0.1f dB down",
             fc, fo, amp, A, snr);
    checks++;
    if (amp < 0.97 * A || amp > 1.03 * A || snr < 35.0) failures++;
    // Mixer output: both products present; output: difference removed.
    tone_measure(mixq, 1200, 960, (fi - 3.4) / 96.0, a_diff, dummy);
    tone_measure(yq, 2400, 960, (fi - 3.4) / 96.0, a_bp, dummy);
    $display("           difference product at %0.1f MHz: %0.1f at the mixer, %0.1f dB down at the output",
             fi - 3.4, a_diff, 20.0 * $log10(amp / (a_bp + 1e-3)));
    checks++;
    if (a_diff < 0.4 * A / 2.0 || 20.0 * $log10(amp / (a_bp + 1e-3)) < 40.0) failures++;
    checks++;
    if (mixq.size() != 8 * n_in) begin
      failures++;
      $display("rate: %0d inputs, %0d interpolated", n_in, mixq.size());
    end
    checks++;
    if (best < 3000) begin
      failures++;
      $display("output stream had gaps: longest run %0d", best);
    end
  endtask

  initial begin
    run_tone(35.0);
    run_tone(36.0);
    run_tone(37.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
