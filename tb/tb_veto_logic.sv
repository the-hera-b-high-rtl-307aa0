// tb_veto_logic: vetoed bunch numbers must hit, others not; the flag must
// survive the CB=0 row and be cleared by the CB=1 row or by clear-all.
module tb_veto_logic;
  logic clk = 0, rst_n = 0, veto_we = 0, q_cb = 0, q_done = 0, clr_all = 0, hit;
  logic [7:0] veto_bn = '0, q_bn = '0;
  logic ref_flag [256];
  int checks = 0, failures = 0;

  veto_logic dut (.clk, .rst_n, .veto_we, .veto_bn, .q_bn, .q_cb, .q_done, .clr_all, .hit);
  always #20 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) ref_flag[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      veto_we = ($urandom % 4) == 0;
      veto_bn = 8'($urandom % 32);
      q_bn    = 8'($urandom % 32);
      q_cb    = 1'($urandom);
      q_done  = ($urandom % 2) == 0;
      clr_all = (k % 1000) == 999;
      #1;
      checks++;
      if (hit !== ref_flag[q_bn]) begin failures++; $display("FAIL hit bn=%0d", q_bn); end
      @(posedge clk);
      if (clr_all) for (int i = 0; i < 256; i++) ref_flag[i] = 0;
      else begin
        if (q_done && q_cb) ref_flag[q_bn] = 0;
        if (veto_we) ref_flag[veto_bn] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
