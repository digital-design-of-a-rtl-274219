// Self-checking test of the gain correction: random samples and Q8.8 gains,
// result compared with an independently computed rounded product, and the
// one-clock latency checked.
module tb_gain_correction;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic signed [15:0] x = 0, y;
  logic [15:0] c = 0;
  longint exp_q[$];

  gain_correction dut (.clk, .rst_n, .in_valid, .x, .gain(c), .out_valid, .y);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected value of each valid input, checked one clock later.
  logic        v_d = 0;
  longint      e_d = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== v_d) begin
        failures++;
        $display("latency mismatch: out_valid=%0b expected %0b", out_valid, v_d);
      end
      if (v_d) begin
        checks++;
        if (longint'(y) != e_d) begin
          failures++;
          $display("mixer mismatch: got %0d expected %0d", y, e_d);
        end
      end
    end
    v_d <= in_valid;
    e_d <= ref_round(longint'(x) * longint'(c), 8);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      case (i % 50)
        0: begin x = -16'sd32768; c = 16'hffff; end      // saturating corner
        1: begin x = 16'sd1000;  c = 16'd56210;  end     // about 219.57
        2: begin x = 16'($urandom); c = 16'd1024; end    // 4.0
        default: begin x = 16'($urandom_range(0, 600)) - 16'sd300; c = 16'($urandom); end
      endcase
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
