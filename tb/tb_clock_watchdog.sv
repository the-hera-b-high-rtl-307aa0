// tb_clock_watchdog: a running 48 ns clock keeps the flag clear; when the
// clock stops the flag must rise within 16..19 cycles and stay until cleared.
module tb_clock_watchdog;
  logic clk = 0, rst_n = 0, mon_clk = 0, clr = 0, err;
  logic run = 1;
  int checks = 0, failures = 0;

  clock_watchdog dut (.clk, .rst_n, .mon_clk, .mon_rst_n(rst_n), .clr, .err);
  always #20 clk = ~clk;
  always #24 if (run) mon_clk = ~mon_clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      repeat (200) begin
        @(posedge clk); #1;
        checks++;
        if (err) begin failures++; $display("FAIL err while clock runs"); end
      end
      run = 0;
      n = 0;
      while (!err && n < 100) begin @(posedge clk); #1; n++; end
      checks++;
      if (n < 15 || n > 22) begin failures++; $display("FAIL detection after %0d cycles", n); end
      run = 1;
      repeat (10) @(posedge clk);
      #1;
      checks++;
      if (!err) begin failures++; $display("FAIL flag not sticky"); end
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      #1;
      checks++;
      if (err) begin failures++; $display("FAIL flag not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
