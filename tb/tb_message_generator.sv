// tb_message_generator: eight modelled PTBs send random data sets over the
// DAV/DAC bus; the look-up table is loaded through the register bus with a
// known pattern (bit 57 set on some entries to ask for extra messages). The
// 20-bit packages are reassembled and every 80-bit message must match one
// expected message: for each data set, each hit pad pair, each M. Msg step,
// {const, BN, table bits}. The TFU enable toggles randomly. Also checks the
// table read-back, the test register path and the Test FIFO: its first 512
// packages are read back in order through the register bus, the overflow and
// empty status bits are checked, and after draining it must hold exactly the
// four packages of the message from the test register.
module tb_message_generator;
  import hpt_pkg::*;
  import tb_ref_pkg::*;
  logic clk25 = 0, clk100 = 0, rst_n = 0;
  logic [7:0] dav, dac;
  dataset_t bus_data;
  logic tfu_en = 1, tfu_valid, tfu_first;
  logic [19:0] tfu_data;
  logic [7:0] vme_addr = '0;
  logic [31:0] vme_wdata = '0, vme_rdata;
  logic vme_we = 0, vme_re = 0;
  dataset_t q [8][$];
  int expm [logic [79:0]];
  int n_exp = 0, n_got = 0, n_multi = 0, checks = 0, failures = 0, part = 0;
  logic [79:0] asm_w;
  logic [19:0] all_pk [$];
  logic written [logic [17:0]];
  logic [14:0] konst = 15'h1234;

  message_generator dut (.clk25, .rst25_n(rst_n), .clk100, .rst100_n(rst_n), .dav, .dac, .bus_data,
    .tfu_en, .tfu_data, .tfu_valid, .tfu_first, .vme_addr, .vme_wdata, .vme_we, .vme_re, .vme_rdata);

  always #20 clk25 = ~clk25;
  always #5 clk100 = ~clk100;

  always @(clk25) begin
    #1;
    for (int p = 0; p < 8; p++) dav[p] = (q[p].size() != 0);
  end
  always_comb begin
    bus_data = '0;
    for (int p = 0; p < 8; p++) if (dac[p] && q[p].size() != 0) bus_data |= q[p][0];
  end
  always @(posedge clk25) for (int p = 0; p < 8; p++) if (rst_n && dac[p]) void'(q[p].pop_front());

  always @(posedge clk100) begin
    if (rst_n && tfu_valid) begin
      checks++;
      if (tfu_first != (part == 0)) begin failures++; $display("FAIL framing"); end
      asm_w[20*part +: 20] = tfu_data;
      all_pk.push_back(tfu_data);
      part = (part + 1) % 4;
      if (part == 0) begin
        n_got++;
        checks++;
        if (!expm.exists(asm_w) || expm[asm_w] == 0) begin failures++; $display("FAIL unexpected message %h", asm_w); end
        else expm[asm_w]--;
      end
    end
  end

  function automatic logic [63:0] lut_f(logic [17:0] a);
    logic [63:0] v;
    v = {6'd0, 1'b0, 18'(a * 18'd40503), a, 3'd0, a[17:0]};
    v[57] = (a[17:16] == 2'd0 && a[4:0] == 5'd7) || (a[17:16] == 2'd1 && a[6]);
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
  task automatic lut_write(logic [17:0] a);
    logic [63:0] v;
    if (written.exists(a)) return;
    written[a] = 1;
    v = lut_f(a);
    wr(8'h03, 32'(a));
    wr(8'h04, v[31:0]);
    wr(8'h05, v[63:32]);
  endtask

  // expected messages of one data set from PTB p; loads the table entries
  task automatic plan(int p, dataset_t d);
    int codes [$];
    ref_codes(d, codes);
    foreach (codes[i]) begin
      for (int m = 0; m < 4; m++) begin
        lut_addr_t a;
        logic [63:0] v;
        logic [79:0] msg;
        a = '{mmsg: 2'(m), cb: d.cb, ptb: 3'(p), code: d.code, road: 5'(codes[i])};
        lut_write(a);
        v = lut_f(a);
        msg = {konst, d.bn, v[56:0]};
        if (expm.exists(msg)) expm[msg]++; else expm[msg] = 1;
        n_exp++;
        if (m > 0) n_multi++;
        if (!v[57]) break;
      end
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dataset_t sets [8][$];
    logic [31:0] d;
    repeat (3) @(posedge clk25);
    rst_n = 1;
    wr(8'h08, 32'(konst));
    // plan and load the table
    for (int k = 0; k < 400; k++) begin
      int p;
      dataset_t s;
      p = $urandom % 8;
      s = dataset_t'($urandom);
      if (k % 50 == 0) begin s.pt2 = '1; s.pt3 = '1; end
      plan(p, s);
      sets[p].push_back(s);
    end
    // table read-back
    begin
      lut_addr_t a;
      logic [63:0] v;
      a = '{mmsg: 0, cb: sets[0][0].cb, ptb: 0, code: sets[0][0].code, road: 0};
      lut_write(a);
      v = lut_f(a);
      wr(8'h03, 32'(a));
      rd(8'h04, d);
      checks++;
      if (d !== v[31:0]) begin failures++; $display("FAIL table read low"); end
      rd(8'h05, d);
      checks++;
      if (d !== v[63:32]) begin failures++; $display("FAIL table read high"); end
    end
    // run: PTBs present their data sets, TFU enable toggles
    for (int p = 0; p < 8; p++) foreach (sets[p][i]) q[p].push_back(sets[p][i]);
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk100);
      tfu_en = ($urandom % 4) != 0;
    end
    tfu_en = 1;
    repeat (30000) begin
      @(posedge clk25);
      if (n_got == n_exp) break;
    end
    repeat (20) @(posedge clk25);
    checks++;
    if (n_got != n_exp) begin failures++; $display("FAIL got %0d of %0d messages", n_got, n_exp); end
    checks++;
    if (n_multi == 0) begin failures++; $display("FAIL no multiple messages"); end
    // Test FIFO: full with the first 512 packages, later ones dropped
    rd(8'h07, d);
    checks++;
    if (d[1:0] != 2'b10) begin failures++; $display("FAIL Test FIFO status %b before read-out", d[1:0]); end
    for (int i = 0; i < 512; i++) begin
      rd(8'h06, d);
      checks++;
      if (d != {12'd0, all_pk[i]}) begin failures++; $display("FAIL Test FIFO word %0d: %h, expected %h", i, d, all_pk[i]); end
    end
    rd(8'h07, d);
    checks++;
    if (d[0] != 1'b1) begin failures++; $display("FAIL Test FIFO not empty after 512 reads"); end
    // test register: one data set injected by the register bus
    wr(8'h00, 32'h1);
    begin
      dataset_t s;
      s = dataset_t'($urandom);
      s.pt2 = 5'b00100; s.pt3 = 6'b000100;   // PT2 pad 2 with PT3 pad 2: one pair
      plan(5, s);
      wr(8'h01, {2'd0, 3'd5, s});
      wr(8'h02, 32'd0);
    end
    repeat (100) @(posedge clk25);
    checks++;
    if (n_got != n_exp) begin failures++; $display("FAIL test register path"); end
    rd(8'h07, d);
    checks++;
    if (d[2] != 1'b0) begin failures++; $display("FAIL test still pending"); end
    // the Test FIFO now holds the four packages of that one message
    for (int i = 4; i > 0; i--) begin
      rd(8'h06, d);
      checks++;
      if (d != {12'd0, all_pk[all_pk.size() - i]}) begin failures++; $display("FAIL Test FIFO test package %0d", 4 - i); end
    end
    rd(8'h07, d);
    checks++;
    if (d[0] != 1'b1) begin failures++; $display("FAIL Test FIFO not empty after the test message"); end
    $display("messages %0d (extra by M. Msg %0d)", n_got, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
