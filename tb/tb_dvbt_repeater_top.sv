// End-to-end test of the repeater at its full size, with the evaluation
// signal of the design: 16-QAM on a carrier fc of 35, 36 or 37 MHz,
// sampled at 90 MS/s.  Symbols (+-1, +-3 on each axis) at 3 Msym/s are
// shaped with a raised-cosine pulse of roll-off 1, so the channel is
// 6 MHz wide.  The repeater, with windowed-sinc filters meeting the
// specified band edges and both DDS tuned to fi = fc - 3 MHz, must return
// the channel on fc at 96 MS/s.  A receiver model in the testbench mixes
// the output down with e^(-j 2 pi fc t), low-pass filters it, finds the
// delay and the best of the 32 sampling phases by correlation with the
// sent symbols, removes the complex gain by least squares and measures
// the modulation error ratio (MER), which must exceed 30 dB; with a gain
// word of 4.0 the end-to-end gain must be 1 within 2 %, and every
// 12 MS/s sample must give exactly 8 output samples.
//
// The 36 MHz run sends the 12 MS/s stream through the AFC ports (looped
// back one clock later) instead of the internal bypass.  Afterwards the
// test provokes the FIFO overflow (output side held in reset), the
// underrun (input stopped) and the input overrun (a sample on every
// clock).  Each mechanism is counted; one that never happens is a failure.
module tb_dvbt_repeater_top;
  import tb_util_pkg::*;
  import dvbt_pkg::*;

  logic clk_in = 0, clk_out = 0, rst_in_n = 0, rst_out_n = 0;
  always #2778 clk_in  = ~clk_in;    // 180 MHz (delays in ps)
  always #5208 clk_out = ~clk_out;   // 96 MHz
  int checks = 0, failures = 0;

  logic        in_coef_we = 0, out_coef_we = 0;
  in_bank_e    in_coef_bank = BANK_LPF;
  out_bank_e   out_coef_bank = BANK_INT8;
  logic [10:0] in_coef_addr = 0, out_coef_addr = 0;
  coef_t       in_coef_data = 0, out_coef_data = 0;
  phase_t      ftw_in = 0, ftw_out = 0;
  logic [15:0] gain = 16'd1024;      // 4.0: each mixer halves the channel
  logic        x_valid = 0, afc_o_valid, afc_bypass = 1, afc_i_valid = 0;
  sample_t     x = 0, afc_o, afc_i = 0, y;
  logic        y_valid, in_overrun, fifo_overflow, fifo_underrun;

  dvbt_repeater_top dut (
    .clk_in, .rst_in_n, .clk_out, .rst_out_n,
    .in_coef_we, .in_coef_bank, .in_coef_addr, .in_coef_data, .ftw_in,
    .x_valid, .x,
    .afc_o_valid, .afc_o, .afc_bypass, .afc_i_valid, .afc_i,
    .out_coef_we, .out_coef_bank, .out_coef_addr, .out_coef_data, .ftw_out, .gain,
    .y_valid, .y,
    .in_overrun, .fifo_overflow, .fifo_underrun
  );

  initial begin
    #20000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AFC stand-in: returns the 12 MS/s stream one clock later.
  always @(posedge clk_in) begin
    afc_i_valid <= afc_o_valid;
    afc_i       <= afc_o;
  end

  // Mechanism counters.
  int n_bb = 0, n_afc = 0, n_hold = 0, n_y = 0, n_ovf = 0, n_unf = 0, n_ovr = 0, n_gain = 0;
  int yq [$];
  always @(posedge clk_in) begin
    if (rst_in_n && afc_o_valid) n_bb++;
    if (rst_in_n && afc_o_valid && !afc_bypass) n_afc++;
  end
  always @(posedge clk_out) begin
    if (rst_out_n && dut.s_valid && !dut.s_ready) n_hold++;
    if (dut.u_out.u_gain.in_valid && dut.u_out.u_gain.y != dut.u_out.u_gain.x) n_gain++;
    if (rst_out_n && y_valid) begin
      n_y++;
      yq.push_back(int'(y));
    end
  end

  task automatic load_in(input in_bank_e b, ref int h[], input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk_in);
      in_coef_we = 1; in_coef_bank = b; in_coef_addr = 11'(k); in_coef_data = 18'(h[k]);
    end
    @(negedge clk_in); in_coef_we = 0;
  endtask

  task automatic load_out(input out_bank_e b, ref int h[], input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk_out);
      out_coef_we = 1; out_coef_bank = b; out_coef_addr = 11'(k); out_coef_data = 18'(h[k]);
    end
    @(negedge clk_out); out_coef_we = 0;
  endtask

  task automatic setup(input real fc);
    int h[];
    rst_in_n = 0; rst_out_n = 0;
    repeat (3) @(posedge clk_out);
    ftw_in  = phase_t'(longint'((fc - 3.0) / 90.0 * 4294967296.0 + 0.5));
    ftw_out = phase_t'(longint'((fc - 3.0) / 96.0 * 4294967296.0 + 0.5));
    rst_in_n = 1; rst_out_n = 1;
    design_fir(h, LPF_TAPS, 90.0, 6.5, 1.0, 0.0, 17);     load_in(BANK_LPF, h, LPF_TAPS / 2);
    design_fir(h, INT2_TAPS, 180.0, 23.75, 2.0, 0.0, 17); load_in(BANK_INT2, h, INT2_TAPS);
    design_fir(h, DEC15_TAPS, 180.0, 12.5, 1.0, 0.0, 17); load_in(BANK_DEC15, h, DEC15_TAPS);
    design_fir(h, INT8_TAPS, 96.0, 6.07, 8.0, 0.0, 16);   load_out(BANK_INT8, h, INT8_TAPS);
    design_fir(h, BPF_TAPS, 96.0, 3.07, 1.0, fc, 17);     load_out(BANK_BPF, h, BPF_TAPS / 2);
  endtask

  // Raised cosine, roll-off 1, t in symbol periods.
  function automatic real rc(input real t);
    real d;
    if (t == 0.0) return 1.0;
    d = 1.0 - 4.0 * t * t;
    if (d > -1e-9 && d < 1e-9) return 0.5;   // limit at t = +-1/2
    return $sin(PI * t) / (PI * t) * $cos(PI * t) / d;
  endfunction

  localparam int  NSYM = 320;
  localparam int  SPAN = 8;          // pulse truncated to +-SPAN symbols
  localparam real UNIT = 1500.0;     // amplitude of one constellation step

  task automatic run_qam(input real fc, input logic via_afc, output real mer, output real gabs);
    int   si [NSYM], sq [NSYM];
    int   nin, nsamp;
    real  t, bi, bq, xv;
    real  g [];
    real  zi [], zq [];
    real  best, c_r, c_i, mag, ni, nq, e_r, e_i, ps, pe, gr, gi, den;
    int   best_o, k0, k1;

    setup(fc);
    afc_bypass = !via_afc;
    yq.delete();
    for (int k = 0; k < NSYM; k++) begin
      si[k] = 2 * int'($urandom_range(0, 3)) - 3;
      sq[k] = 2 * int'($urandom_range(0, 3)) - 3;
    end
    nsamp = (NSYM + 2 * SPAN) * 30;
    for (nin = 0; nin < nsamp; nin++) begin
      t = real'(nin) / 30.0;             // time in symbols
      bi = 0.0; bq = 0.0;
      for (int k = int'(t) - SPAN - 1; k <= int'(t) + SPAN + 1; k++)
        if (k >= 0 && k < NSYM && (t - real'(k + SPAN)) > -real'(SPAN) && (t - real'(k + SPAN)) < real'(SPAN)) begin
          bi += real'(si[k]) * rc(t - real'(k + SPAN));
          bq += real'(sq[k]) * rc(t - real'(k + SPAN));
        end
      xv = UNIT * (bi * $cos(2.0 * PI * fc / 90.0 * real'(nin)) - bq * $sin(2.0 * PI * fc / 90.0 * real'(nin)));
      @(negedge clk_in); x_valid = 1; x = sample_t'(int'(xv));
      @(negedge clk_in); x_valid = 0;
    end
    // Let the chain drain: about 13 us of delay.
    repeat (2 * 180 * 16) @(posedge clk_in);

    // Receiver model: mix down, low-pass (windowed sinc, 4 MHz, 97 taps).
    design_fir_real(g, 97, 96.0, 4.0);
    zi = new[yq.size()];
    zq = new[yq.size()];
    for (int n = 0; n < yq.size(); n++) begin
      zi[n] = 0.0; zq[n] = 0.0;
      for (int j = 0; j < 97 && j <= n; j++) begin
        zi[n] += g[j] * 2.0 * real'(yq[n-j]) * $cos(2.0 * PI * fc / 96.0 * real'(n-j));
        zq[n] -= g[j] * 2.0 * real'(yq[n-j]) * $sin(2.0 * PI * fc / 96.0 * real'(n-j));
      end
    end
    // Delay and phase search: correlate 200 symbols with the sent ones.
    best = 0.0; best_o = 0;
    k0 = 40; k1 = 240;
    for (int o = 0; o < 3200; o++) begin
      if (o + 32 * k1 >= yq.size()) break;
      c_r = 0.0; c_i = 0.0;
      for (int k = k0; k < k1; k++) begin
        // z * conj(a)
        c_r += zi[o + 32*k] * real'(si[k]) + zq[o + 32*k] * real'(sq[k]);
        c_i += zq[o + 32*k] * real'(si[k]) - zi[o + 32*k] * real'(sq[k]);
      end
      mag = c_r * c_r + c_i * c_i;
      if (mag > best) begin best = mag; best_o = o; end
    end
    // Least-squares complex gain, then MER.
    c_r = 0.0; c_i = 0.0; den = 0.0;
    for (int k = k0; k < k1; k++) begin
      c_r += zi[best_o + 32*k] * real'(si[k]) + zq[best_o + 32*k] * real'(sq[k]);
      c_i += zq[best_o + 32*k] * real'(si[k]) - zi[best_o + 32*k] * real'(sq[k]);
      den += real'(si[k] * si[k] + sq[k] * sq[k]);
    end
    gr = c_r / den; gi = c_i / den;
    ps = 0.0; pe = 0.0;
    for (int k = k0; k < k1; k++) begin
      ni = gr * real'(si[k]) - gi * real'(sq[k]);
      nq = gr * real'(sq[k]) + gi * real'(si[k]);
      e_r = zi[best_o + 32*k] - ni;
      e_i = zq[best_o + 32*k] - nq;
      ps += ni * ni + nq * nq;
      pe += e_r * e_r + e_i * e_i;
    end
    mer = 10.0 * $log10(ps / pe);
    gabs = $sqrt(gr * gr + gi * gi) / UNIT;
    $display("fc=%0.0f MHz%s: %0d output samples, delay %0d samples at 96 MS/s, gain %0.3f, MER %0.2f dB",
             fc, via_afc ? " (via AFC ports)" : "", yq.size(), best_o - 32 * SPAN,
             $sqrt(gr * gr + gi * gi) / UNIT, mer);
  endtask

  function automatic void design_fir_real(ref real h[], input int n, input real fs, input real fcut);
    real c, t, w, sum;
    h = new[n];
    sum = 0.0;
    for (int k = 0; k < n; k++) begin
      t = real'(k) - real'(n - 1) / 2.0;
      c = 2.0 * fcut / fs;
      h[k] = (t == 0.0) ? c : $sin(PI * c * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(n - 1));
      h[k] = h[k] * w;
      sum += h[k];
    end
    for (int k = 0; k < n; k++) h[k] = h[k] / sum;
  endfunction

  initial begin
    real mer, gabs;
    real fcs [3];
    fcs = '{35.0, 36.0, 37.0};
    for (int i = 0; i < 3; i++) begin
      n_y = 0; n_bb = 0;
      run_qam(fcs[i], (i == 1), mer, gabs);
      checks++;
      if (mer < 30.0) begin
        failures++;
        $display("MER below 30 dB");
      end
      checks++;
      if (gabs < 0.98 || gabs > 1.02) begin
        failures++;
        $display("end-to-end gain %0.3f, expected 1", gabs);
      end
      // Every 12 MS/s sample becomes exactly 8 output samples.
      checks++;
      if (n_y != 8 * n_bb) begin
        failures++;
        $display("rate: %0d samples at 12 MS/s, %0d at 96 MS/s", n_bb, n_y);
      end
      checks++;
      if (in_overrun || fifo_overflow) begin
        failures++;
        $display("unexpected overrun/overflow flag");
      end
    end
    // Underrun: the input has stopped, the output stage starves.
    checks++;
    if (fifo_underrun) n_unf++;
    else begin
      failures++;
      $display("no underrun after the input stopped");
    end
    // Overflow: output side held in reset while the input runs.
    rst_out_n = 0;
    afc_bypass = 1;
    for (int i = 0; i < 16 * 15 * 2 + 100; i++) begin
      @(negedge clk_in); x_valid = (i % 2 == 0); x = sample_t'($urandom_range(0, 2000));
    end
    @(negedge clk_in); x_valid = 0;
    checks++;
    if (fifo_overflow) n_ovf++;
    else begin
      failures++;
      $display("no FIFO overflow with the output stage stopped");
    end
    // Overrun: a sample on every clock.
    repeat (20) begin
      @(negedge clk_in); x_valid = 1;
    end
    @(negedge clk_in); x_valid = 0;
    repeat (10) @(posedge clk_in);
    checks++;
    if (in_overrun) n_ovr++;
    else begin
      failures++;
      $display("no input overrun at twice the input rate");
    end
    $display("mechanisms: decimated %0d, via AFC ports %0d, interpolator hold-off %0d, gain applied %0d, overflow %0d, underrun %0d, overrun %0d",
             n_bb, n_afc, n_hold, n_gain, n_ovf, n_unf, n_ovr);
    checks++;
    if (n_afc == 0 || n_hold == 0 || n_gain == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
