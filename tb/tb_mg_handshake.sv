// tb_mg_handshake: eight modelled PTBs with queues of data sets answer DAC
// by driving the bus. Checks that every data set arrives once, in order per
// PTB, with the right PTB code; that at most one DAC is high and only for a
// raised DAV; that with all PTBs busy the grants run 7,6,...,0 per DAV
// pattern (highest first, each PTB once); and test register injection.
module tb_mg_handshake;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0, test_mode = 0, test_load = 0, test_taken;
  logic [7:0] dav, dac;
  dataset_t   bus_data;
  mg_in_t     test_data = '0, dir_data;
  logic       dir_valid, dir_ready = 1;
  dataset_t   q [8][$];
  int checks = 0, failures = 0, got = 0, sent = 0;
  int grants [$];
  int ready_prob = 100;

  mg_handshake dut (.clk, .rst_n, .dav, .dac, .bus_data, .test_mode, .test_load, .test_data,
                    .test_taken, .dir_valid, .dir_data, .dir_ready);
  always #20 clk = ~clk;

  // PTB models: DAV while a data set waits; bus driven while DAC
  always @(clk) begin
    #1;
    for (int p = 0; p < 8; p++) dav[p] = (q[p].size() != 0);
  end
  always_comb begin
    bus_data = '0;
    for (int p = 0; p < 8; p++) if (dac[p] && q[p].size() != 0) bus_data |= q[p][0];
  end

  dataset_t expd [8][$];
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if ($countones(dac) > 1 || (dac & ~dav) != 0) begin failures++; $display("FAIL dac %b dav %b", dac, dav); end
      for (int p = 0; p < 8; p++) if (dac[p]) begin
        void'(q[p].pop_front());
        grants.push_back(p);
      end
      if (dir_valid && dir_ready && !test_mode) begin
        checks++;
        got++;
        if (expd[dir_data.ptb].size() == 0 || dir_data.ds !== expd[dir_data.ptb][0]) begin
          failures++; $display("FAIL data from PTB %0d", dir_data.ptb);
        end
        if (expd[dir_data.ptb].size() != 0) void'(expd[dir_data.ptb].pop_front());
      end
    end
  end
  always @(negedge clk) dir_ready <= ($urandom % 100) < ready_prob;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(int p);
    dataset_t d;
    d = dataset_t'({$urandom, $urandom});
    q[p].push_back(d);
    expd[p].push_back(d);
    sent++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all eight busy, no back-pressure: fixed grant order
    @(negedge clk);
    for (int p = 0; p < 8; p++) repeat (4) add(p);
    repeat (100) @(negedge clk);
    checks++;
    if (grants.size() != 32) begin failures++; $display("FAIL %0d grants", grants.size()); end
    for (int i = 0; i < grants.size(); i++) begin
      checks++;
      if (grants[i] != 7 - (i % 8)) begin failures++; $display("FAIL grant %0d is PTB %0d", i, grants[i]); end
    end
    // random arrivals and back-pressure
    ready_prob = 60;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) add($urandom % 8);
    end
    repeat (300) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL received %0d of %0d", got, sent); end
    // test register injection
    ready_prob = 100;
    @(negedge clk);
    test_mode = 1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      test_data = mg_in_t'({$urandom, $urandom});
      test_load = 1;
      while (!test_taken) @(negedge clk);
      @(negedge clk);
      test_load = 0;
      checks++;
      if (!dir_valid || dir_data !== test_data || dac != 0) begin failures++; $display("FAIL test injection"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
