// tb_coincidence_logic: random rows (sparse and dense) through the three-
// stage pipeline. The expected RSF pattern is built independently by walking
// every PT2/PT3 pair of every road; R-Flg must be high exactly two cycles
// after the row is presented and only when a road exists. Also checks the
// mask register and the test register in test mode.
module tb_coincidence_logic;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [95:0] pt1, pt2, pt3, mask [3], test_pads [3];
  logic [7:0]  bn_in = '0, test_bn = '0, bn_out;
  logic        cb_in = 0, test_mode = 0, test_strobe = 0, test_cb = 0;
  logic        fifo_we, cb_out;
  logic [95:0] rsf_out, pt2_out, pt3_out;
  int checks = 0, failures = 0, roads = 0;

  coincidence_logic dut (.clk, .rst_n, .pt1, .pt2, .pt3, .bn_in, .cb_in, .mask,
    .test_mode, .test_strobe, .test_pads, .test_bn, .test_cb,
    .fifo_we, .rsf_out, .pt2_out, .pt3_out, .bn_out, .cb_out);

  always #24 clk = ~clk;

  function automatic logic [95:0] ref_rsf(logic [95:0] a, logic [95:0] b, logic [95:0] c);
    logic [95:0] r = '0;
    // PT2 pad j with PT3 pad j or j+1 makes a segment; every PT1 pad within
    // two pads of j sees it.
    for (int j = 0; j < 96; j++)
      for (int k = j; k <= j + 1 && k < 96; k++)
        if (b[j] && c[k])
          for (int i = j - 2; i <= j + 2; i++)
            if (i >= 0 && i < 96 && a[i]) r[i] = 1'b1;
    return r;
  endfunction

  function automatic logic [95:0] rnd(int density);   // density in 1/16
    logic [95:0] v;
    for (int i = 0; i < 96; i++) v[i] = ($urandom % 16) < density;
    return v;
  endfunction

  // queue of expected results, checked two cycles later
  logic [95:0] q1 [$], q2 [$], q3 [$];
  logic [7:0]  qb [$];
  logic        qc [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(logic [95:0] e1, logic [95:0] e2, logic [95:0] e3, logic [7:0] eb, logic ec);
    logic [95:0] er;
    er = ref_rsf(e1, e2, e3);
    checks++;
    if (fifo_we !== (er != '0) || rsf_out !== er) begin
      failures++; $display("FAIL rsf got %h exp %h", rsf_out, er);
    end
    if (er != '0) begin
      roads++;
      checks++;
      if (pt2_out !== e2 || pt3_out !== e3 || bn_out !== eb || cb_out !== ec) begin
        failures++; $display("FAIL data set fields");
      end
    end
  endtask

  initial begin
    logic [95:0] a, b, c;
    for (int L = 0; L < 3; L++) begin mask[L] = '0; test_pads[L] = '0; end
    pt1 = '0; pt2 = '0; pt3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // live data; bn_in stands for the already registered BN (stage-1 aligned)
    for (int k = 0; k < 600; k++) begin
      int d;
      d = 1 + (k % 6);
      @(negedge clk);
      a = rnd(d); b = rnd(d); c = rnd(d);
      pt1 = a; pt2 = b; pt3 = c;
      q1.push_back(a); q2.push_back(b); q3.push_back(c);
      @(posedge clk); #1;
      bn_in = 8'(k); cb_in = 1'(k);
      qb.push_back(8'(k)); qc.push_back(1'(k));
      if (q1.size() > 1) check_out(q1.pop_front(), q2.pop_front(), q3.pop_front(), qb.pop_front(), qc.pop_front());
    end
    // masks: disabled bits never count
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      for (int L = 0; L < 3; L++) mask[L] = rnd(4);
      a = rnd(8); b = rnd(8); c = rnd(8);
      pt1 = a; pt2 = b; pt3 = c;
      @(negedge clk); @(negedge clk);
      #1;
      begin
        logic [95:0] er;
        er = ref_rsf(a & ~mask[0], b & ~mask[1], c & ~mask[2]);
        checks++;
        if (rsf_out !== er || pt2_out !== (b & ~mask[1])) begin failures++; $display("FAIL mask"); end
      end
    end
    for (int L = 0; L < 3; L++) mask[L] = '0;
    // test mode: only the strobed test pattern enters
    @(negedge clk);
    test_mode = 1; pt1 = '1; pt2 = '1; pt3 = '1;
    repeat (3) @(negedge clk);
    checks++;
    if (fifo_we) begin failures++; $display("FAIL live data in test mode"); end
    for (int k = 0; k < 50; k++) begin
      test_pads[0] = rnd(6); test_pads[1] = rnd(6); test_pads[2] = rnd(6);
      test_bn = 8'($urandom); test_cb = 1'($urandom);
      test_strobe = 1;
      @(negedge clk);
      test_strobe = 0;
      @(negedge clk);
      begin
        logic [95:0] er;
        er = ref_rsf(test_pads[0], test_pads[1], test_pads[2]);
        checks++;
        if (rsf_out !== er || fifo_we !== (er != '0) ||
            (er != '0 && (bn_out !== test_bn || cb_out !== test_cb))) begin
          failures++; $display("FAIL test pattern");
        end
      end
      @(negedge clk);
      checks++;
      if (fifo_we) begin failures++; $display("FAIL test pattern repeated"); end
    end
    checks++;
    if (roads < 100) begin failures++; $display("FAIL too few roads %0d", roads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
