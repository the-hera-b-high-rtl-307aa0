// tb_mg_msg_stage: the testbench plays road encoder, look-up table (a hash
// of the address whose bit 57 asks for another message) and Message FIFO
// (randomly full). Every road must give the messages {const, BN, table bits}
// for M. Msg = 0, 1, ... until bit 57 is clear or four were made.
module tb_mg_msg_stage;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, mf_we, mf_full = 0;
  logic [4:0] in_code = '0;
  mg_buf_t in_buf = '0;
  lut_addr_t lut_addr;
  logic [63:0] lut_data;
  message_t mf_wdata;
  logic [14:0] konst = 15'h5a5a;
  message_t expq [$];
  int checks = 0, failures = 0, n_multi = 0;

  mg_msg_stage dut (.clk, .rst_n, .in_valid, .in_code, .in_buf, .in_ready, .lut_addr, .lut_data,
                    .konst, .mf_we, .mf_wdata, .mf_full);
  always #20 clk = ~clk;

  function automatic logic [63:0] lut_f(logic [17:0] a);
    logic [63:0] v;
    v = {a * 18'd7919, a, a ^ 18'h2aaaa, 10'(a)};
    v[57] = (a[3:0] == 4'd5) || (a[17:16] != 0 && a[2:0] == 3'd5);
    return v;
  endfunction
  assign lut_data = lut_f(lut_addr);

  always @(negedge clk) mf_full <= ($urandom % 4) == 0;
  always @(posedge clk) begin
    if (rst_n && mf_we) begin
      checks++;
      if (mf_full) begin failures++; $display("FAIL write while full"); end
      if (expq.size() == 0 || mf_wdata !== expq[0]) begin failures++; $display("FAIL message %h", mf_wdata); end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      logic [4:0] c;
      mg_buf_t b;
      int m;
      c = 5'($urandom % 18);
      b = mg_buf_t'($urandom);
      m = 0;
      forever begin
        lut_addr_t a;
        logic [63:0] d;
        a = '{mmsg: 2'(m), cb: b.cb, ptb: b.ptb, code: b.code, road: c};
        d = lut_f(a);
        expq.push_back('{konst: konst, bn: b.bn, lut: d[56:0]});
        if (!d[57] || m == 3) break;
        m++;
      end
      if (m > 0) n_multi++;
      @(negedge clk);
      in_valid = 1; in_code = c; in_buf = b;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_multi < 20) begin failures++; $display("FAIL left %0d, multi %0d", expq.size(), n_multi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
