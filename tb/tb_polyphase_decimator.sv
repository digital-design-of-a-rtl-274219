// Self-checking test of the polyphase decimator: by 15 with 256 taps (its
// use in the input stage) and by 4 with 10 taps.  Random coefficients and
// samples, random gaps in the input strobe.  Counting samples s from 0,
// after every sample with s mod M = M-1 the output
//   y = round(sum_n h[n] * x[s-n] / 2^SHIFT)
// must appear exactly one clock later, and at no other time.
module tb_polyphase_decimator;
  import tb_util_pkg::*;
  localparam int ND = 2;
  localparam int MM [ND] = '{15, 4};
  localparam int NT [ND] = '{256, 10};
  localparam int SH [ND] = '{17, 14};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               coef_we = 0;
  logic [8:0]         coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic [ND-1:0]      sel = 0;
  logic               in_valid = 0;
  logic signed [15:0] x = 0;
  logic [ND-1:0]      ov;
  logic signed [15:0] y [ND];

  polyphase_decimator #(.M(15), .NTAPS(256), .SHIFT(17)) u0 (.clk, .rst_n,
    .coef_we(coef_we & sel[0]), .coef_addr(coef_addr[8:0]), .coef_data,
    .in_valid, .x, .out_valid(ov[0]), .y(y[0]));
  polyphase_decimator #(.M(4), .NTAPS(10), .SHIFT(14)) u1 (.clk, .rst_n,
    .coef_we(coef_we & sel[1]), .coef_addr(coef_addr[3:0]), .coef_data,
    .in_valid, .x, .out_valid(ov[1]), .y(y[1]));

  int h [ND][];
  int hist [$];
  int nsamp = 0, nout [ND];
  logic   due [ND];
  longint expv [ND];
  logic   running = 0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (running) begin
      for (int f = 0; f < ND; f++) begin
        checks++;
        if (ov[f] !== due[f]) begin
          failures++;
          if (failures < 10) $display("decim %0d: out_valid %0b expected %0b at sample %0d", f, ov[f], due[f], nsamp);
        end else if (ov[f]) begin
          nout[f]++;
          checks++;
          if (longint'(y[f]) != expv[f]) begin
            failures++;
            if (failures < 10) $display("decim %0d: got %0d expected %0d", f, y[f], expv[f]);
          end
        end
        due[f] = 1'b0;
      end
      if (in_valid) begin
        hist.push_front(int'(x));
        if (hist.size() > 300) void'(hist.pop_back());
        for (int f = 0; f < ND; f++)
          if (nsamp % MM[f] == MM[f] - 1) begin
            longint acc;
            acc = 0;
            for (int n = 0; n < NT[f] && n < hist.size(); n++)
              acc += longint'(h[f][n]) * longint'(hist[n]);
            expv[f] = ref_round(acc, SH[f]);
            due[f]  = 1'b1;
          end
        nsamp++;
      end
    end
  end

  initial begin
    for (int f = 0; f < ND; f++) begin
      h[f] = new[NT[f]];
      nout[f] = 0; due[f] = 0; expv[f] = 0;
      for (int k = 0; k < NT[f]; k++) h[f][k] = int'($urandom_range(0, 131071)) - 65536;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < ND; f++)
      for (int k = 0; k < NT[f]; k++) begin
        @(negedge clk);
        coef_we = 1; sel = ND'(1) << f; coef_addr = 9'(k); coef_data = 18'(h[f][k]);
      end
    @(negedge clk); coef_we = 0; sel = 0;
    running = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      in_valid = (i < 3000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      x = (i % 61 == 3) ? 16'sh7fff : 16'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < ND; f++) begin
      checks++;
      if (nout[f] != nsamp / MM[f]) begin
        failures++;
        $display("decim %0d: %0d outputs for %0d samples", f, nout[f], nsamp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
