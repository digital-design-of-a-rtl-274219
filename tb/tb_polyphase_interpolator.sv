// Self-checking test of the polyphase interpolator at both of its uses:
// by 2 with 51 taps and by 8 with 972 taps.  Random coefficients and
// samples; the producer keeps in_valid up and changes the sample only
// when it is taken, sometimes pausing.  Each output is compared with
//   y[n*L + p] = round(sum_j h[j*L + p] * x[n-j] / 2^SHIFT)
// and must carry phase p; the first phase must appear two clocks after
// its input was taken.  The test also counts the clocks in which the
// producer was held off by in_ready and requires back-to-back operation
// (an output on every clock) while the producer never pauses.
module tb_polyphase_interpolator;
  import tb_util_pkg::*;
  localparam int NI = 2;
  localparam int LL [NI] = '{2, 8};
  localparam int NT [NI] = '{51, 972};
  localparam int SH [NI] = '{17, 16};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               coef_we = 0;
  logic [9:0]         coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic [NI-1:0]      sel = 0;
  logic [NI-1:0]      iv = 0, ir, ov;
  logic signed [15:0] xi [NI];
  logic signed [15:0] y  [NI];
  logic               ph0;
  logic [2:0]         ph1;
  int                 oph [NI];

  polyphase_interpolator #(.L(2), .NTAPS(51), .SHIFT(17)) u0 (.clk, .rst_n,
    .coef_we(coef_we & sel[0]), .coef_addr(coef_addr[5:0]), .coef_data,
    .in_valid(iv[0]), .in_ready(ir[0]), .x(xi[0]), .out_valid(ov[0]), .out_phase(ph0), .y(y[0]));
  polyphase_interpolator #(.L(8), .NTAPS(972), .SHIFT(16)) u1 (.clk, .rst_n,
    .coef_we(coef_we & sel[1]), .coef_addr(coef_addr[9:0]), .coef_data,
    .in_valid(iv[1]), .in_ready(ir[1]), .x(xi[1]), .out_valid(ov[1]), .out_phase(ph1), .y(y[1]));
  assign oph[0] = int'(ph0);
  assign oph[1] = int'(ph1);

  int h [NI][];
  int hist [NI][$];
  longint expq [NI][$];
  int     phq  [NI][$];
  int     first_due [NI];
  int     cyc = 0, stalls [NI], streak [NI], best [NI];
  logic   running = 0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_out(int f, int p);
    longint acc = 0;
    for (int j = 0; j * LL[f] + p < NT[f] && j < hist[f].size(); j++)
      acc += longint'(h[f][j*LL[f]+p]) * longint'(hist[f][j]);
    return ref_round(acc, SH[f]);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (running) begin
      for (int f = 0; f < NI; f++) begin
        if (iv[f] && !ir[f]) stalls[f]++;
        if (iv[f] && ir[f]) begin
          hist[f].push_front(int'(xi[f]));
          if (hist[f].size() > 200) void'(hist[f].pop_back());
          for (int p = 0; p < LL[f]; p++) begin
            expq[f].push_back(ref_out(f, p));
            phq[f].push_back(p);
          end
          if (expq[f].size() == LL[f]) first_due[f] = cyc + 2;
        end
        if (ov[f]) begin
          longint e;
          int     p;
          e = expq[f].pop_front();
          p = phq[f].pop_front();
          checks++;
          if (longint'(y[f]) != e || oph[f] != p) begin
            failures++;
            if (failures < 10) $display("interp %0d: got %0d/ph%0d expected %0d/ph%0d", f, y[f], oph[f], e, p);
          end
          if (p == 0 && first_due[f] != 0) begin
            checks++;
            if (cyc != first_due[f]) begin
              failures++;
              $display("interp %0d: first output at %0d, expected %0d", f, cyc, first_due[f]);
            end
            first_due[f] = 0;
          end
          streak[f]++;
          if (streak[f] > best[f]) best[f] = streak[f];
        end else begin
          streak[f] = 0;
        end
      end
    end
  end

  // Producers: hold the sample until it is taken; pause after half.
  for (genvar f = 0; f < NI; f++) begin : g_prod
    initial begin
      int n = 0;
      xi[f] = 0;
      wait (running);
      while (n < 400) begin
        @(negedge clk);
        if (!iv[f] || ir[f]) begin
          if (iv[f]) n++;
          iv[f] = (n < 200) ? 1'b1 : ($urandom_range(0, 3) == 0);
          xi[f] = (n % 53 == 7) ? -16'sd32768 : 16'($urandom);
        end
      end
      @(negedge clk); iv[f] = 0;
    end
  end

  initial begin
    for (int f = 0; f < NI; f++) begin
      h[f] = new[NT[f]];
      stalls[f] = 0; streak[f] = 0; best[f] = 0; first_due[f] = 0;
      for (int k = 0; k < NT[f]; k++) h[f][k] = int'($urandom_range(0, 131071)) - 65536;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NI; f++)
      for (int k = 0; k < NT[f]; k++) begin
        @(negedge clk);
        coef_we = 1; sel = NI'(1) << f; coef_addr = 10'(k); coef_data = 18'(h[f][k]);
      end
    @(negedge clk); coef_we = 0; sel = 0;
    running = 1;
    repeat (4500) @(posedge clk);
    for (int f = 0; f < NI; f++) begin
      checks++;
      if (expq[f].size() != 0) begin
        failures++;
        $display("interp %0d: %0d outputs missing", f, expq[f].size());
      end
      checks++;
      if (stalls[f] == 0) begin
        failures++;
        $display("interp %0d: producer was never held off", f);
      end
      checks++;
      if (best[f] < 100 * LL[f]) begin
        failures++;
        $display("interp %0d: longest gap-free output run %0d", f, best[f]);
      end
      $display("interp %0d (L=%0d): %0d stall clocks, longest gap-free run %0d", f, LL[f], stalls[f], best[f]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
