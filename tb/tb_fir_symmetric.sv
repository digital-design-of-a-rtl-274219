// Self-checking test of the folded symmetric FIR at three lengths: the
// 128-tap input low-pass, the 1068-tap output band-pass (both at their
// default lengths) and an odd 11-tap filter that exercises the unfolded
// centre tap.  Random coefficients and samples, random gaps in the input
// strobe; every output is compared with a direct convolution using the
// full (mirrored) coefficient set, and appears exactly two clocks after
// its input.
module tb_fir_symmetric;
  import tb_util_pkg::*;
  localparam int NF = 3;
  localparam int NT [NF] = '{128, 1068, 11};
  localparam int SH [NF] = '{17, 17, 12};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               coef_we = 0;
  logic [10:0]        coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic [NF-1:0]      sel = 0;
  logic               in_valid = 0;
  logic signed [15:0] x = 0;
  logic [NF-1:0]      ov;
  logic signed [15:0] y [NF];

  fir_symmetric #(.NTAPS(128), .SHIFT(17)) u0 (.clk, .rst_n, .coef_we(coef_we & sel[0]),
    .coef_addr(coef_addr[5:0]), .coef_data, .in_valid, .x, .out_valid(ov[0]), .y(y[0]));
  fir_symmetric #(.NTAPS(1068), .SHIFT(17)) u1 (.clk, .rst_n, .coef_we(coef_we & sel[1]),
    .coef_addr(coef_addr[9:0]), .coef_data, .in_valid, .x, .out_valid(ov[1]), .y(y[1]));
  fir_symmetric #(.NTAPS(11), .SHIFT(12)) u2 (.clk, .rst_n, .coef_we(coef_we & sel[2]),
    .coef_addr(coef_addr[2:0]), .coef_data, .in_valid, .x, .out_valid(ov[2]), .y(y[2]));

  int h [NF][];
  int hist [$];            // newest first
  logic [1:0] vpipe = 0;
  longint expq [NF][$];

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv(int f);
    longint acc = 0;
    for (int k = 0; k < NT[f] && k < hist.size(); k++)
      acc += longint'(h[f][k]) * longint'(hist[k]);
    return ref_round(acc, SH[f]);
  endfunction

  always @(posedge clk) begin
    if (rst_n && coef_we == 0) begin
      vpipe <= {vpipe[0], in_valid};
      if (in_valid) begin
        hist.push_front(int'(x));
        if (hist.size() > 1100) void'(hist.pop_back());
        for (int f = 0; f < NF; f++) expq[f].push_back(conv(f));
      end
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (ov[f] !== vpipe[1]) begin
          failures++;
          $display("filter %0d: out_valid timing wrong", f);
        end
        if (ov[f]) begin
          longint e;
          e = expq[f].pop_front();
          checks++;
          if (longint'(y[f]) != e) begin
            failures++;
            if (failures < 10) $display("filter %0d: got %0d expected %0d", f, y[f], e);
          end
        end
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      h[f] = new[NT[f]];
      for (int k = 0; k < (NT[f] + 1) / 2; k++) begin
        h[f][k] = int'($urandom_range(0, 65535)) - 32768;
        h[f][NT[f]-1-k] = h[f][k];
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++) begin
      for (int k = 0; k < (NT[f] + 1) / 2; k++) begin
        @(negedge clk);
        coef_we = 1; sel = NF'(1) << f; coef_addr = 11'(k); coef_data = 18'(h[f][k]);
      end
    end
    @(negedge clk); coef_we = 0; sel = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i < 1500) ? 1'b1 : ($urandom_range(0, 2) == 0);
      x = (i % 97 == 5) ? 16'sh7fff : 16'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    for (int f = 0; f < NF; f++) if (expq[f].size() != 0) begin
      failures++;
      $display("filter %0d: %0d outputs missing", f, expq[f].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
