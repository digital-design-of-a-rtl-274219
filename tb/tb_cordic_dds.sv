// Self-checking test of the CORDIC DDS.  For several tuning words (the
// two carriers of the repeater and random ones) the outputs after each
// strobe are compared with A*cos and A*sin of the accumulated phase
// computed in floating point, A = 32767, within a few LSBs.  The
// pipeline latency of ITER+2 strobes and the hold when `en` is low are
// checked exactly.
module tb_cordic_dds;
  import tb_util_pkg::*;
  localparam int ITER = 16;
  localparam int LAT  = ITER + 2;
  localparam int TOL  = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en = 0;
  logic [31:0] ftw = 0;
  logic signed [15:0] cos_o, sin_o;
  int maxerr = 0;

  cordic_dds #(.PHASE_W(32), .OUT_W(16), .ITER(ITER)) dut (.clk, .rst_n, .en, .ftw, .cos_o, .sin_o);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] w, input int nstrobe);
    int n = 0;
    real ph;
    int ec, es, d;
    rst_n = 0; en = 0; ftw = w;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (n < nstrobe) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (en) begin
        n++;
        if (n < LAT) begin
          ec = 0; es = 0;
        end else begin
          ph = 2.0 * PI * real'((longint'(n - LAT) * longint'(w)) % (longint'(1) << 32)) / 4294967296.0;
          ec = int'(32767.0 * $cos(ph));
          es = int'(32767.0 * $sin(ph));
        end
        checks++;
        d = (int'(cos_o) - ec); if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        if (d > TOL) begin
          failures++;
          if (failures < 10) $display("cos n=%0d got %0d exp %0d", n, cos_o, ec);
        end
        checks++;
        d = (int'(sin_o) - es); if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        if (d > TOL) begin
          failures++;
          if (failures < 10) $display("sin n=%0d got %0d exp %0d", n, sin_o, es);
        end
      end
    end
    @(negedge clk); en = 0;
  endtask

  initial begin
    run(32'd1527099483, 2000);   // 32 MHz at 90 MS/s
    run(32'd1431655765, 2000);   // 32 MHz at 96 MS/s
    run(32'h4000_0000, 200);     // quarter turn per strobe
    for (int i = 0; i < 5; i++) run($urandom, 1000);
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
