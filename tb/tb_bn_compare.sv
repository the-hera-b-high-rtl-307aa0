// tb_bn_compare: consistent Bunch Number copies must leave the error flag
// clear; a flipped bit in any of the 66 compared bits must set it (and the
// interrupt when enabled) until it is cleared; disabled comparison ignores it.
module tb_bn_compare;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, err_clr = 0, irq_en = 0;
  logic [5:0] cb_a, bn_a, cb_b;
  logic [7:0] bn_b [6];
  logic [7:0] bn_out;
  logic cb_out, mismatch, err, irq;
  int checks = 0, failures = 0;

  bn_compare dut (.clk, .rst_n, .enable, .cb_a, .bn_a, .cb_b, .bn_b, .err_clr, .irq_en,
                  .bn_out, .cb_out, .mismatch, .err, .irq);
  always #24 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic drive_ok(logic [7:0] b, logic c);
    cb_a = {6{c}}; cb_b = {6{c}}; bn_a = {6{b[0]}};
    for (int l = 0; l < 6; l++) bn_b[l] = b;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    drive_ok(8'd0, 1'b0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      b = 8'($urandom);
      @(negedge clk); drive_ok(b, 1'(k));
      @(negedge clk);
      chk(bn_out == b && cb_out == 1'(k), "BN/CB passed on");
      chk(!err && !mismatch, "no error on consistent copies");
    end
    irq_en = 1;
    for (int k = 0; k < 66; k++) begin
      b = 8'($urandom);
      @(negedge clk);
      drive_ok(b, 1'b0);
      if (k < 6)       cb_a[k] = ~cb_a[k];
      else if (k < 12) bn_a[k-6] = ~bn_a[k-6];
      else if (k < 18) cb_b[k-12] = ~cb_b[k-12];
      else             bn_b[(k-18)/8][(k-18)%8] = ~bn_b[(k-18)/8][(k-18)%8];
      @(negedge clk);
      chk(err && mismatch && irq, $sformatf("error on bit %0d", k));
      drive_ok(b, 1'b0);
      err_clr = 1;
      @(negedge clk);
      err_clr = 0;
      chk(!err && !irq, "error cleared");
    end
    enable = 0;
    @(negedge clk); cb_a[2] = ~cb_a[2];
    @(negedge clk);
    chk(!err, "no error while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
