// tb_road_encoder: random data sets with random downstream stalls; the codes
// leaving must be the hit PT2/PT3 pairs of each data set in increasing
// order, carrying that data set's buffer fields. With no stall, k codes must
// leave in k consecutive cycles (one per 40 ns).
module tb_road_encoder;
  import hpt_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  mg_in_t in_data = '0;
  logic [4:0] out_code;
  mg_buf_t out_buf;
  int checks = 0, failures = 0, n_codes = 0;
  int expc [$];
  mg_buf_t expb [$];
  int rprob = 100;

  road_encoder dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_code,
                    .out_buf, .out_ready);
  always #20 clk = ~clk;

  always @(negedge clk) out_ready <= ($urandom % 100) < rprob;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      n_codes++;
      if (expc.size() == 0 || out_code != 5'(expc[0]) || out_buf !== expb[0]) begin
        failures++; $display("FAIL code %0d exp %0d", out_code, expc.size() ? expc[0] : -1);
      end
      if (expc.size() != 0) begin void'(expc.pop_front()); void'(expb.pop_front()); end
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(mg_in_t d);
    int tmp [$];
    mg_buf_t b;
    ref_codes(d.ds, tmp);
    b = '{code: d.ds.code, ptb: d.ptb, bn: d.ds.bn, cb: d.ds.cb};
    foreach (tmp[i]) begin expc.push_back(tmp[i]); expb.push_back(b); end
    @(negedge clk);
    in_valid = 1; in_data = d;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int c0, t0;
    mg_in_t d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rprob = 70;
    for (int k = 0; k < 500; k++) begin
      d = mg_in_t'({$urandom, $urandom});
      send(d);
    end
    rprob = 100;
    repeat (50) @(negedge clk);
    checks++;
    if (expc.size() != 0) begin failures++; $display("FAIL %0d codes missing", expc.size()); end
    // all 11 pads hit: 18 codes in 18 cycles
    d = mg_in_t'({$urandom, $urandom});
    d.ds.pt2 = '1; d.ds.pt3 = '1;
    c0 = n_codes;
    fork send(d); join_none
    @(posedge clk);
    t0 = 0;
    repeat (19) @(posedge clk);
    #1;
    checks++;
    if (n_codes - c0 != 18) begin failures++; $display("FAIL %0d codes in 19 cycles", n_codes - c0); end
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
