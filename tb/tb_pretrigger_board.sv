// tb_pretrigger_board: one PTB fed with packed transfer-channel words, one
// detector row per 48 ns, and read out by a modelled Message Generator.
// Checks the data sets against the reference road search and data set
// list, then through the register bus: the 29-bit counter, the Test FIFO
// copy, the per-event limit, the mask, the test register in test mode, the
// calorimeter veto, and the Bunch Number error flag with its interrupt.
module tb_pretrigger_board;
  import hpt_pkg::*;
  import tb_ref_pkg::*;
  logic clk48 = 0, clk25 = 0, rst_n = 0;
  ab_word_t rx [12];
  logic dav, dac = 0, irq;
  dataset_t bus_data;
  logic veto_we = 0;
  logic [7:0] veto_bn = '0, vme_addr = '0;
  logic [31:0] vme_wdata = '0, vme_rdata;
  logic vme_we = 0, vme_re = 0;
  dataset_t expq [$];
  int checks = 0, failures = 0, n_sets = 0, tf_words = 0;
  logic bn_fault = 0;

  pretrigger_board dut (.clk48, .rst48_n(rst_n), .clk25, .rst25_n(rst_n), .rx_word(rx), .card(4'd3),
    .dav, .dac, .bus_data, .veto_we, .veto_bn, .vme_addr, .vme_wdata, .vme_we, .vme_re, .vme_rdata, .irq);

  always #24 clk48 = ~clk48;
  always #20 clk25 = ~clk25;

  always @(negedge clk25) dac <= dav && !dac;
  always @(posedge clk25) begin
    if (rst_n && dac) begin
      checks++;
      n_sets++;
      if (expq.size() == 0 || bus_data !== expq[0]) begin
        failures++; $display("FAIL data set %h exp %h", bus_data, expq.size() ? expq[0] : '0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  task automatic put_row(logic [95:0] p [3], logic [7:0] bn, logic cb);
    for (int L = 0; L < 3; L++)
      for (int h = 0; h < 2; h++) begin
        logic [47:0] hp;
        int l;
        l = 2*L + h;
        hp = p[L][48*h +: 48];
        rx[2*l]   = {cb, bn[0], hp[29:0]};
        rx[2*l+1] = {cb, 5'd0, bn, hp[47:30]};
      end
    if (bn_fault) rx[7][20] = ~rx[7][20];
  endtask

  function automatic logic [95:0] rnd(int d);
    logic [95:0] v;
    for (int i = 0; i < 96; i++) v[i] = ($urandom % 64) < d;
    return v;
  endfunction

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk25);
    vme_addr = a; vme_wdata = d; vme_we = 1;
    @(negedge clk25);
    vme_we = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk25);
    vme_addr = a; vme_re = 1;
    @(negedge clk25);
    vme_re = 0;
    d = vme_rdata;
  endtask

  // expected data sets of one row (empty if no road)
  task automatic expect_row(logic [95:0] p [3], logic [7:0] bn, logic cb, int max_sets,
                            logic [95:0] m [3]);
    event_t e;
    e.rsf = ref_rsf(p[0] & ~m[0], p[1] & ~m[1], p[2] & ~m[2]);
    e.pt2 = p[1] & ~m[1];
    e.pt3 = p[2] & ~m[2];
    e.bn = bn; e.cb = cb;
    ref_sets(e, max_sets, expq);
  endtask

  task automatic run_rows(int n, int d, int max_sets, logic [95:0] m [3]);
    logic [95:0] p [3];
    for (int k = 0; k < n; k++) begin
      @(negedge clk48);
      p[0] = rnd(d); p[1] = rnd(d); p[2] = rnd(d);
      put_row(p, 8'(k / 2), 1'(k));
      expect_row(p, 8'(k / 2), 1'(k), max_sets, m);
    end
    @(negedge clk48);
    p[0] = '0; p[1] = '0; p[2] = '0;
    put_row(p, 8'(n / 2), 1'(n));
  endtask

  task automatic drain();
    int n = 0;
    while (expq.size() != 0 && n < 50000) begin @(posedge clk25); n++; end
    repeat (40) @(posedge clk25);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [95:0] nomask [3], m [3];
    logic [95:0] p [3];
    for (int L = 0; L < 3; L++) begin nomask[L] = '0; p[L] = '0; end
    put_row(p, 8'd0, 1'b0);
    repeat (4) @(posedge clk25);
    rst_n = 1;
    repeat (4) @(posedge clk25);
    // 1. live rows
    run_rows(400, 4, 0, nomask);
    drain();
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d data sets missing", expq.size()); end
    rd(8'h02, d);
    checks++;
    if (d != 32'(n_sets)) begin failures++; $display("FAIL counter %0d vs %0d", d, n_sets); end
    rd(8'h04, d);
    tf_words = int'(d);
    checks++;
    if (tf_words != (n_sets > 512 ? 512 : n_sets)) begin failures++; $display("FAIL test fifo level %0d", d); end
    rd(8'h03, d);
    checks++;
    if (d[30:27] != 4'd3) begin failures++; $display("FAIL test fifo card %h", d); end
    rd(8'h01, d);
    checks++;
    if (d[2:0] != 3'b000) begin failures++; $display("FAIL status %b", d[2:0]); end
    // 2. limit of two data sets per event and a mask
    wr(8'h00, 32'h0000_0200);
    for (int L = 0; L < 3; L++) m[L] = rnd(8);
    for (int w = 0; w < 9; w++) wr(8'h10 + 8'(w), {m[(32*w+31)/96][(32*w+31)%96 -: 32]});
    run_rows(300, 6, 2, m);
    drain();
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d data sets missing (limit/mask)", expq.size()); end
    for (int w = 0; w < 9; w++) wr(8'h10 + 8'(w), 32'd0);
    // 3. veto: bunch 5 vetoed, its two rows give nothing
    wr(8'h00, 32'h0);
    @(negedge clk25);
    veto_we = 1; veto_bn = 8'd5;
    @(negedge clk25);
    veto_we = 0;
    for (int k = 8; k < 14; k++) begin
      @(negedge clk48);
      p[0] = 96'h0000_0000_0000_0100_0000_0000; p[1] = p[0]; p[2] = p[0];
      put_row(p, 8'(k / 2), 1'(k));
      if (k / 2 != 5) expect_row(p, 8'(k / 2), 1'(k), 0, nomask);
    end
    @(negedge clk48); p[0] = '0; put_row(p, 8'd7, 1'b0);
    drain();
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL veto"); end
    // 4. test mode: live input ignored, test pattern once per start
    wr(8'h00, 32'h1);
    repeat (4) @(negedge clk48);
    p[0] = '1; p[1] = '1; p[2] = '1;
    put_row(p, 8'd0, 1'b0);
    for (int k = 0; k < 10; k++) begin
      logic [95:0] tp [3];
      logic [287:0] tv;
      tp[0] = rnd(6); tp[1] = rnd(6); tp[2] = rnd(6);
      tv = {tp[2], tp[1], tp[0]};
      for (int w = 0; w < 9; w++) wr(8'h20 + 8'(w), tv[32*w +: 32]);
      expect_row(tp, 8'(100 + k), 1'(k), 0, nomask);
      wr(8'h05, {23'd0, 1'(k), 8'(100 + k)});
      drain();
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL test mode"); end
    rd(8'h01, d);
    checks++;
    if (d[0]) begin failures++; $display("FAIL BN error in test mode"); end
    // 5. Bunch Number fault with interrupt
    @(negedge clk48);
    p[0] = '0; p[1] = '0; p[2] = '0;
    put_row(p, 8'd0, 1'b0);
    wr(8'h00, 32'h2);
    repeat (4) @(negedge clk48);
    p[0] = '0; p[1] = '0; p[2] = '0;
    bn_fault = 1; put_row(p, 8'd1, 1'b0);
    @(negedge clk48); bn_fault = 0; put_row(p, 8'd1, 1'b1);
    repeat (6) @(negedge clk25);
    rd(8'h01, d);
    checks++;
    if (!d[0] || !irq) begin failures++; $display("FAIL BN error not flagged"); end
    wr(8'h00, 32'h6);
    repeat (6) @(negedge clk25);
    wr(8'h00, 32'h2);
    repeat (6) @(negedge clk25);
    rd(8'h01, d);
    checks++;
    if (d[0] || irq) begin failures++; $display("FAIL BN error not cleared"); end
    $display("data sets %0d", n_sets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
