// Self-checking test of the dual-clock FIFO with unrelated write (10 ns)
// and read (17 ns) clocks.  Words carry a running count, so order, loss
// and duplication are all visible at the read side.  A first phase
// writes without reading until the FIFO must be full and checks that the
// extra writes raise `overflow` and are dropped and that the reader's
// fill level shows all 16 words; a second phase runs both
// sides at random rates and checks every word read.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5   wclk = ~wclk;
  always #8.5 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic        wr_en = 0, rd_en = 0, full, overflow, empty;
  logic [15:0] wdata = 0, rdata;
  logic [4:0]  rlevel;

  async_fifo #(.DW(16), .AW(4)) dut (.wclk, .wrst_n, .wr_en, .wdata, .full, .overflow,
                                     .rclk, .rrst_n, .rd_en, .rdata, .empty, .rlevel);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wcount = 0, rcount = 0, ovf_seen = 0, dropped = 0;
  logic phase2 = 0;

  // Write side.
  always @(posedge wclk) begin
    if (wrst_n) begin
      if (overflow) ovf_seen++;
      if (wr_en && !full) wcount++;
      if (wr_en && full) dropped++;
    end
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // Phase 1: fill beyond capacity with reads stopped.
    for (int i = 0; i < 24; i++) begin
      @(negedge wclk);
      wr_en = 1; wdata = 16'(wcount);
    end
    @(negedge wclk); wr_en = 0;
    repeat (4) @(posedge wclk);
    checks++;
    if (!full || wcount != 16 || dropped != 8) begin
      failures++;
      $display("fill: full=%0b written=%0d dropped=%0d", full, wcount, dropped);
    end
    checks++;
    if (ovf_seen != 8) begin
      failures++;
      $display("overflow pulses %0d, expected 8", ovf_seen);
    end
    repeat (4) @(posedge rclk);
    checks++;
    if (rlevel != 5'd16) begin
      failures++;
      $display("reader sees %0d words, expected 16", rlevel);
    end
    phase2 = 1;
    // Phase 2: random writes, never while full.
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      wr_en = !full && ($urandom_range(0, 1) == 1);
      wdata = 16'(wcount);
    end
    @(negedge wclk); wr_en = 0;
  end

  // Read side: words must come out as 0, 1, 2, ...
  always @(posedge rclk) begin
    if (rrst_n && rd_en && !empty) begin
      checks++;
      if (rdata != 16'(rcount)) begin
        failures++;
        if (failures < 10) $display("read %0d: got %0d", rcount, rdata);
      end
      rcount++;
    end
  end

  initial begin
    wait (phase2);
    repeat (4000) begin
      @(negedge rclk);
      rd_en = !empty && ($urandom_range(0, 2) != 0);
    end
    rd_en = 0;
    while (!empty) begin
      @(negedge rclk); rd_en = 1;
    end
    @(negedge rclk); rd_en = 0;
    repeat (4) @(posedge rclk);
    checks++;
    if (rcount != wcount || !empty) begin
      failures++;
      $display("written %0d, read %0d", wcount, rcount);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
