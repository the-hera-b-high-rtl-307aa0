// tb_sync_fifo: random pushes and pops of the 512 x 32 Test FIFO against a
// queue, then fill to full (extra words dropped) and drain.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, we = 0, re = 0, full, empty;
  logic [31:0] wdata = '0, rdata;
  logic [9:0]  count;
  logic [31:0] q [$];
  int checks = 0, failures = 0;

  sync_fifo dut (.clk, .rst_n, .we, .wdata, .full, .re, .rdata, .empty, .count);
  always #20 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic w, logic r);
    @(negedge clk);
    we = w; re = r; wdata = $urandom;
    @(posedge clk);
    if (re && !empty) begin
      checks++;
      if (q.size() == 0 || rdata !== q[0]) begin failures++; $display("FAIL data"); end
      if (q.size() != 0) void'(q.pop_front());
    end
    if (we && !full) q.push_back(wdata);
    #1;
    checks++;
    if (count != 10'(q.size()) || empty != (q.size() == 0)) begin failures++; $display("FAIL count %0d vs %0d", count, q.size()); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) step(($urandom % 2) == 1, ($urandom % 2) == 1);
    repeat (600) step(1'b1, 1'b0);
    checks++;
    if (!full || q.size() != 512) begin failures++; $display("FAIL full"); end
    repeat (600) step(1'b0, 1'b1);
    checks++;
    if (!empty) begin failures++; $display("FAIL empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
