// tb_ptb_output_ctrl: the testbench plays Event FIFO, veto table and
// Message Generator. Random events go in; the data sets taken with random
// DAC timing must equal the reference list (highest RSF first, vetoed events
// dropped, at most max_sets per event). Also checks the 29-bit counter, the
// Test FIFO copy, and the rate: an event with all 96 RSF bits set must give
// 96 data sets in 96 + 4 cycles when DAC answers at once.
module tb_ptb_output_ctrl;
  import hpt_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  event_t   fifo_rdata;
  logic     fifo_empty = 1, fifo_re, veto_hit = 0, veto_q_cb, veto_q_done, count_clr = 0;
  logic [7:0] veto_q_bn;
  logic [6:0] max_sets = '0;
  logic       dav, dac = 0, tf_we, vetoed;
  dataset_t   data;
  logic [31:0] tf_wdata;
  logic [28:0] count;
  int checks = 0, failures = 0, n_sets = 0, n_vetoed = 0, n_limited = 0;

  event_t   evq [$];
  dataset_t expq [$];
  logic     vset [256];
  int       dac_prob = 50;

  ptb_output_ctrl dut (.clk, .rst_n, .fifo_rdata, .fifo_empty, .fifo_re,
    .veto_hit, .veto_q_bn, .veto_q_cb, .veto_q_done, .max_sets, .card(4'd5), .count_clr,
    .dav, .dac, .data, .tf_we, .tf_wdata, .count, .vetoed);

  always #20 clk = ~clk;

  // FIFO and veto table outputs are refreshed shortly after every clock edge
  always @(clk) begin
    #1;
    fifo_empty = (evq.size() == 0);
    fifo_rdata = (evq.size() != 0) ? evq[0] : '0;
    veto_hit   = vset[fifo_rdata.bn];
  end

  always @(posedge clk) begin
    if (rst_n && fifo_re) begin
      // the table forgets a vetoed bunch once its second row is consumed
      if (veto_hit && veto_q_cb) vset[veto_q_bn] = 0;
      void'(evq.pop_front());
    end
  end

  // Message Generator side
  always @(negedge clk) dac <= dav && (($urandom % 100) < dac_prob);
  always @(posedge clk) begin
    if (rst_n && dac) begin
      checks++;
      n_sets++;
      if (expq.size() == 0 || data !== expq[0]) begin
        failures++;
        $display("FAIL data set @%0t n=%0d %h exp %h", $time, n_sets, data, expq.size() ? expq[0] : '0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
    if (rst_n && tf_we) begin
      checks++;
      if (tf_wdata[31:27] !== 5'd5) begin failures++; $display("FAIL test fifo card"); end
    end
  end

  function automatic event_t rnd_event(int density);
    event_t e;
    for (int i = 0; i < 96; i++) begin
      e.rsf[i] = ($urandom % 64) < density;
      e.pt2[i] = 1'($urandom);
      e.pt3[i] = 1'($urandom);
    end
    if (e.rsf == '0) e.rsf[$urandom % 96] = 1'b1;
    e.bn = 8'($urandom % 64);
    e.cb = 1'($urandom);
    return e;
  endfunction

  task automatic push(event_t e);
    if (vset[e.bn]) begin
      n_vetoed++;
    end else begin
      dataset_t tmp [$];
      ref_sets(e, int'(max_sets), tmp);
      if (max_sets != 0 && $countones(e.rsf) > int'(max_sets)) n_limited++;
      foreach (tmp[i]) expq.push_back(tmp[i]);
    end
    evq.push_back(e);
  endtask

  task automatic wait_idle();
    int n = 0;
    while ((evq.size() != 0 || expq.size() != 0) && n < 20000) begin @(posedge clk); n++; end
    repeat (10) @(posedge clk);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int i = 0; i < 256; i++) vset[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // plain traffic
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      push(rnd_event(1 + k % 8));
      repeat ($urandom % 20) @(negedge clk);
    end
    wait_idle();
    checks++;
    if (count != 29'(n_sets)) begin failures++; $display("FAIL counter %0d vs %0d", count, n_sets); end
    // per-event limit
    max_sets = 7'd3;
    for (int k = 0; k < 100; k++) begin @(negedge clk); push(rnd_event(6)); end
    wait_idle();
    // veto: veto table entries are set by the testbench, the model drops them
    max_sets = '0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      if (k % 3 == 0) vset[$urandom % 64] = 1;
      push(rnd_event(3));
      wait_idle();
    end
    wait_idle();
    checks++;
    if (n_vetoed == 0 || n_limited == 0) begin failures++; $display("FAIL veto %0d / limit %0d not exercised", n_vetoed, n_limited); end
    // counter clear
    @(negedge clk); count_clr = 1; @(negedge clk); count_clr = 0;
    checks++;
    if (count != 0) begin failures++; $display("FAIL counter clear"); end
    // rate: 96 data sets from one event
    dac_prob = 100;
    for (int i = 0; i < 256; i++) vset[i] = 0;
    @(negedge clk);
    begin
      event_t e;
      e = rnd_event(1); e.rsf = '1;
      push(e);
    end
    t0 = n_sets;
    repeat (100) @(posedge clk);
    #1;
    checks++;
    if (n_sets - t0 != 96) begin failures++; $display("FAIL rate: %0d data sets in 100 cycles", n_sets - t0); end
    wait_idle();
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d data sets missing", expq.size()); end
    $display("data sets %0d, vetoed events %0d, limited events %0d", n_sets, n_vetoed, n_limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
