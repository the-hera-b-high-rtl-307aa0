// tb_tfu_mux: messages from a modelled FIFO must leave as four 20-bit
// packages, low bits first, with first/valid framing; back-to-back messages
// must keep the bus busy every 10 ns cycle; with tfu_en low no new message
// starts, but a started one completes.
module tb_tfu_mux;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0, msg_empty = 1, msg_re, tfu_en = 1, tfu_valid, tfu_first;
  logic [79:0] msg_data = '0;
  logic [19:0] tfu_data;
  logic [79:0] src [$], expq [$];
  logic [79:0] asm_w;
  int part = 0, checks = 0, failures = 0, n_valid = 0, n_msgs = 0;

  tfu_mux dut (.clk, .rst_n, .msg_empty, .msg_data, .msg_re, .tfu_en, .tfu_data, .tfu_valid, .tfu_first);
  always #5 clk = ~clk;

  always @(clk) begin
    #1;
    msg_empty = (src.size() == 0);
    msg_data  = (src.size() != 0) ? src[0] : '0;
  end
  always @(posedge clk) begin
    if (rst_n && msg_re) begin
      expq.push_back(src[0]);
      void'(src.pop_front());
    end
    if (rst_n && tfu_valid) begin
      n_valid++;
      checks++;
      if (tfu_first != (part == 0)) begin failures++; $display("FAIL framing"); end
      asm_w[20*part +: 20] = tfu_data;
      part = (part + 1) % 4;
      if (part == 0) begin
        n_msgs++;
        checks++;
        if (expq.size() == 0 || asm_w !== expq[0]) begin failures++; $display("FAIL message"); end
        if (expq.size() != 0) void'(expq.pop_front());
      end
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full rate
    for (int k = 0; k < 50; k++) src.push_back({$urandom, $urandom, $urandom});
    @(posedge clk); @(posedge clk);
    v0 = n_valid;
    repeat (100) @(posedge clk);
    checks++;
    if (n_valid - v0 != 100) begin failures++; $display("FAIL rate %0d packages in 100 cycles", n_valid - v0); end
    wait (src.size() == 0);
    repeat (10) @(posedge clk);
    // disabled by the TFUs
    @(negedge clk);
    tfu_en = 0;
    for (int k = 0; k < 20; k++) src.push_back({$urandom, $urandom, $urandom});
    v0 = n_valid;
    repeat (50) @(posedge clk);
    checks++;
    if (n_valid - v0 > 4 || src.size() < 19) begin failures++; $display("FAIL output while disabled"); end
    // random enable
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      tfu_en = ($urandom % 3) != 0;
      if ($urandom % 8 == 0) src.push_back({$urandom, $urandom, $urandom});
    end
    tfu_en = 1;
    repeat (200) @(posedge clk);
    checks++;
    if (src.size() != 0 || expq.size() != 0 || part != 0) begin failures++; $display("FAIL leftovers"); end
    $display("messages %0d", n_msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
