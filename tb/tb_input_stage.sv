// Tone test of the input stage at its full size.  Filters are loaded with
// Hamming-windowed sinc designs meeting the specified band edges (low-pass
// 6.5 MHz at 90 MS/s; interpolator 23.75 MHz at 180 MS/s with gain 2;
// decimator 12.5 MHz at 180 MS/s).  For each carrier fc of 35, 36 and
// 37 MHz a tone at fc + 0.4 MHz enters at 90 MS/s (one sample every
// second clock) with the DDS tuned to fi = fc - 3 MHz.  Checks:
//  * the 12 MS/s output is a 3.4 MHz tone of half the input amplitude
//    (the mixer's cosine splits the power), within 3 %, with all other
//    power at least 35 dB lower;
//  * at the low-pass output the mixer's sum product, aliased to
//    90 - (fc + 0.4 + fi) MHz, is at least 40 dB below the wanted tone;
//  * exactly 2 outputs leave for every 15 samples entering the decimator
//    (2 per 15 input samples) and the overrun flag stays low;
//  * finally, samples offered on every clock (twice the rated input rate)
//    make the overrun flag rise.
module tb_input_stage;
  import tb_util_pkg::*;
  import dvbt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2778 clk = ~clk;       // 180 MHz (delays in ps)
  int checks = 0, failures = 0;

  logic        coef_we = 0;
  in_bank_e    coef_bank = BANK_LPF;
  logic [10:0] coef_addr = 0;
  coef_t       coef_data = 0;
  phase_t      ftw = 0;
  logic        x_valid = 0;
  sample_t     x = 0;
  logic        bb_valid, overrun;
  sample_t     bb;

  input_stage dut (.clk, .rst_n, .coef_we, .coef_bank, .coef_addr, .coef_data, .ftw,
                   .x_valid, .x, .bb_valid, .bb, .overrun);

  initial begin
    #5000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bbq [$], lpfq [$];
  int n_int = 0;
  always @(posedge clk) begin
    if (bb_valid) bbq.push_back(int'(bb));
    if (dut.lpf_v) lpfq.push_back(int'(dut.lpf_y));
    if (dut.int_v) n_int++;
  end

  task automatic load(input in_bank_e b, ref int h[], input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      coef_we = 1; coef_bank = b; coef_addr = 11'(k); coef_data = 18'(h[k]);
    end
    @(negedge clk); coef_we = 0;
  endtask

  localparam real A = 12000.0;

  task automatic run_tone(input real fc);
    real fin, fi, amp, snr, amp_img, snr_img;
    int  nin;
    fin = fc + 0.4;
    fi  = fc - 3.0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    bbq.delete(); lpfq.delete(); n_int = 0;
    ftw = phase_t'(longint'(fi / 90.0 * 4294967296.0 + 0.5));
    #1 rst_n = 1;
    begin
      int h[];
      design_fir(h, LPF_TAPS, 90.0, 6.5, 1.0, 0.0, 17);   load(BANK_LPF, h, LPF_TAPS / 2);
      design_fir(h, INT2_TAPS, 180.0, 23.75, 2.0, 0.0, 17); load(BANK_INT2, h, INT2_TAPS);
      design_fir(h, DEC15_TAPS, 180.0, 12.5, 1.0, 0.0, 17); load(BANK_DEC15, h, DEC15_TAPS);
    end
    nin = 0;
    while (bbq.size() < 680) begin
      @(negedge clk); x_valid = 1;
      x = sample_t'(int'(A * $cos(2.0 * PI * fin / 90.0 * real'(nin))));
      nin++;
      @(negedge clk); x_valid = 0;
    end
    repeat (40) @(posedge clk);
    tone_measure(bbq, 80, 600, 3.4 / 12.0, amp, snr);
    $display("fc=%0.1f MHz: 12 MS/s output tone amplitude %0.1f (expected %0.1f), rest %0.1f dB down",
             fc, amp, A / 2.0, snr);
    checks++;
    if (amp < 0.97 * A / 2.0 || amp > 1.03 * A / 2.0 || snr < 35.0) failures++;
    // Sum product at the low-pass output (aliased into the first zone).
    tone_measure(lpfq, 300, 900, 3.4 / 90.0, amp, snr);
    tone_measure(lpfq, 300, 900, (90.0 - (fin + fi)) / 90.0, amp_img, snr_img);
    $display("           low-pass output: wanted %0.1f, sum product at %0.1f MHz %0.1f dB down",
             amp, 90.0 - (fin + fi), 20.0 * $log10(amp / amp_img));
    checks++;
    if (20.0 * $log10(amp / amp_img) < 40.0) failures++;
    checks++;
    if (bbq.size() != n_int / 15 || n_int != 2 * lpfq.size()) begin
      failures++;
      $display("rate: %0d lpf, %0d interpolated, %0d decimated", lpfq.size(), n_int, bbq.size());
    end
    checks++;
    if (overrun) begin
      failures++;
      $display("overrun at the rated input rate");
    end
  endtask

  initial begin
    run_tone(35.0);
    run_tone(36.0);
    run_tone(37.0);
    // Twice the rated input rate.
    repeat (20) begin
      @(negedge clk); x_valid = 1; x = sample_t'($urandom);
    end
    @(negedge clk); x_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (!overrun) begin
      failures++;
      $display("overrun flag did not rise at twice the input rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
