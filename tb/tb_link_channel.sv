// tb_link_channel: checks that one link channel presents row m with CB=0 and
// row m+1 with CB=1 in the two 48 ns cycles after each bunch crossing strobe,
// with the pads split 30/18 and the Bunch Number copies in place.
module tb_link_channel;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0, bx = 0;
  logic [47:0] row_m = '0, row_m1 = '0;
  logic [7:0]  bn = '0;
  ab_word_t    tx1, tx2;
  int checks = 0, failures = 0;

  link_channel dut (.clk, .rst_n, .bx, .row_m, .row_m1, .bn, .tx1_word(tx1), .tx2_word(tx2));

  always #24 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] em, em1;
    logic [7:0]  eb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      em  = {$urandom, $urandom};
      em1 = {$urandom, $urandom};
      eb  = 8'($urandom);
      @(negedge clk);
      bx = 1; row_m = em; row_m1 = em1; bn = eb;
      @(negedge clk);
      bx = 0; row_m = '1; row_m1 = '1; bn = ~eb;    // inputs change, registers hold
      chk(tx1, {1'b0, eb[0], em[29:0]}, "row m tx1");
      chk(tx2, {1'b0, 5'd0, eb, em[47:30]}, "row m tx2");
      @(negedge clk);
      chk(tx1, {1'b1, eb[0], em1[29:0]}, "row m+1 tx1");
      chk(tx2, {1'b1, 5'd0, eb, em1[47:30]}, "row m+1 tx2");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
