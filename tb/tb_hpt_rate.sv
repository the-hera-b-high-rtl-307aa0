// tb_hpt_rate: throughput of one full-size trigger section (16 Link Boards,
// 8 Pretrigger Boards, one Message Generator) under a heavy, sustained load.
// The complete trigger is meant to find and encode about 10^8 track
// candidates per second with eight sections, i.e. 1.25*10^7 messages per
// second from each Message Generator. Here every pad of all three layers is
// hit with probability 1/8 for 64 bunch crossings, far more roads than the
// output can carry, so a backlog builds up in the Event FIFOs and the
// Message Generator runs at its limit. The testbench measures the message
// rate at the TFU output from the first to the last message and requires at
// least 1.25*10^7 per second; the design's ceiling is one message per 40 ns.
// As in the end-to-end test every message is compared with the reference
// (road search, data sets, pad pairs, table pattern without extra messages),
// all must arrive, and no Event FIFO may overflow. The links are modelled as
// one 48 ns cycle of delay, link channel g = link*8 + ptb on board g/3.
module tb_hpt_rate;
  import hpt_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = 8, NLB = 16, NBX = 64, DENS = 8;
  localparam real MIN_RATE = 1.25e7;
  logic clk48 = 0, clk25 = 0, clk100 = 0, rst_n = 0;
  logic bx = 0;
  logic [7:0] bn = '0;
  logic [47:0] lb_row_m [NLB][3], lb_row_m1 [NLB][3];
  ab_word_t lb_tx [NLB][3][2];
  ab_word_t ptb_rx [NP][12];
  logic veto_we = 0;
  logic [7:0] veto_bn = '0;
  logic tfu_en = 1, tfu_valid, tfu_first, irq;
  logic [19:0] tfu_data;
  logic [3:0] vme_slot = '0;
  logic [7:0] vme_addr = '0;
  logic [31:0] vme_wdata = '0, vme_rdata;
  logic vme_we = 0, vme_re = 0;
  int checks = 0, failures = 0;
  int n_exp = 0, n_got = 0, part = 0;
  int expm [logic [79:0]];
  logic [79:0] asm_w;
  logic written [logic [17:0]];
  logic [14:0] konst = 15'h1a5e;
  realtime t_first = 0, t_last = 0;

  hpt_section dut (.clk48, .rst48_n(rst_n), .clk25, .rst25_n(rst_n), .clk100, .rst100_n(rst_n),
    .bx, .bn, .lb_row_m, .lb_row_m1, .lb_tx, .ptb_rx, .veto_we, .veto_bn,
    .tfu_en, .tfu_data, .tfu_valid, .tfu_first,
    .vme_slot, .vme_addr, .vme_wdata, .vme_we, .vme_re, .vme_rdata, .irq);

  always #24 clk48 = ~clk48;
  always #20 clk25 = ~clk25;
  always #5  clk100 = ~clk100;

  always @(posedge clk48)
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < 6; l++)
        for (int t = 0; t < 2; t++)
          ptb_rx[p][2*l+t] <= lb_tx[(l*NP+p)/3][(l*NP+p)%3][t];

  always @(posedge clk100) begin
    if (rst_n && tfu_valid) begin
      checks++;
      if (tfu_first != (part == 0)) begin failures++; $display("FAIL framing"); end
      if (tfu_first) begin
        if (n_got == 0) t_first = $realtime;
        t_last = $realtime;
      end
      asm_w[20*part +: 20] = tfu_data;
      part = (part + 1) % 4;
      if (part == 0) begin
        n_got++;
        checks++;
        if (!expm.exists(asm_w) || expm[asm_w] == 0) begin failures++; $display("FAIL unexpected message %h", asm_w); end
        else expm[asm_w]--;
      end
    end
  end

  // table pattern: no entry asks for a further message
  function automatic logic [63:0] lut_f(logic [17:0] a);
    return {7'd0, 18'(a * 18'd91813), a, 3'd2, a};
  endfunction

  task automatic wr(logic [3:0] s, logic [7:0] a, logic [31:0] d);
    @(negedge clk25);
    vme_slot = s; vme_addr = a; vme_wdata = d; vme_we = 1;
    @(negedge clk25);
    vme_we = 0;
  endtask
  task automatic rd(logic [3:0] s, logic [7:0] a, output logic [31:0] d);
    @(negedge clk25);
    vme_slot = s; vme_addr = a; vme_re = 1;
    @(negedge clk25);
    vme_re = 0;
    d = vme_rdata;
  endtask

  function automatic logic [95:0] rnd();
    logic [95:0] v;
    for (int i = 0; i < 96; i++) v[i] = ($urandom % 64) < DENS;
    return v;
  endfunction

  logic [95:0] det [NBX][NP][2][3];

  task automatic plan_row(int x, int p, int r);
    event_t e;
    dataset_t sets [$];
    e.rsf = ref_rsf(det[x][p][r][0], det[x][p][r][1], det[x][p][r][2]);
    if (e.rsf == '0) return;
    e.pt2 = det[x][p][r][1]; e.pt3 = det[x][p][r][2];
    e.bn = 8'(x); e.cb = 1'(r);
    ref_sets(e, 0, sets);
    foreach (sets[i]) begin
      int codes [$];
      ref_codes(sets[i], codes);
      foreach (codes[j]) begin
        lut_addr_t a;
        logic [63:0] v;
        logic [79:0] msg;
        a = '{mmsg: 2'd0, cb: sets[i].cb, ptb: 3'(p), code: sets[i].code, road: 5'(codes[j])};
        v = lut_f(a);
        if (!written.exists(a)) begin
          written[a] = 1;
          wr(4'd8, 8'h03, 32'(a));
          wr(4'd8, 8'h04, v[31:0]);
          wr(4'd8, 8'h05, v[63:32]);
        end
        msg = {konst, e.bn, v[56:0]};
        if (expm.exists(msg)) expm[msg]++; else expm[msg] = 1;
        n_exp++;
      end
    end
  endtask

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    real rate;
    for (int b = 0; b < NLB; b++)
      for (int c = 0; c < 3; c++) begin lb_row_m[b][c] = '0; lb_row_m1[b][c] = '0; end
    for (int p = 0; p < NP; p++) for (int t = 0; t < 12; t++) ptb_rx[p][t] = '0;
    repeat (4) @(posedge clk25);
    rst_n = 1;
    wr(4'd8, 8'h08, 32'(konst));
    for (int x = 0; x < NBX; x++)
      for (int p = 0; p < NP; p++)
        for (int r = 0; r < 2; r++) begin
          for (int L = 0; L < 3; L++) det[x][p][r][L] = rnd();
          plan_row(x, p, r);
        end
    for (int x = 0; x <= NBX; x++) begin
      @(negedge clk48);
      bx = 1;
      bn = 8'(x);
      for (int p = 0; p < NP; p++)
        for (int l = 0; l < 6; l++) begin
          int g;
          g = l * NP + p;
          lb_row_m[g/3][g%3]  = (x < NBX) ? det[x][p][0][l/2][48*(l%2) +: 48] : '0;
          lb_row_m1[g/3][g%3] = (x < NBX) ? det[x][p][1][l/2][48*(l%2) +: 48] : '0;
        end
      @(negedge clk48);
      bx = 0;
    end
    repeat (200000) begin
      @(posedge clk25);
      if (n_got == n_exp) break;
    end
    repeat (20) @(posedge clk25);
    checks++;
    if (n_got != n_exp) begin failures++; $display("FAIL got %0d of %0d messages", n_got, n_exp); end
    for (int p = 0; p < NP; p++) begin
      rd(4'(p), 8'h01, d);
      checks++;
      if (d[2:0] != 3'b000) begin failures++; $display("FAIL PTB %0d status %b", p, d[2:0]); end
    end
    // sustained rate, in messages per second (time unit 1 ns)
    rate = (n_got > 1 && t_last > t_first) ? real'(n_got - 1) / ((t_last - t_first) * 1.0e-9) : 0.0;
    $display("messages %0d in %0.1f us: %0.3g per second (needed %0.3g, ceiling 2.5e7)",
             n_got, (t_last - t_first) / 1000.0, rate, MIN_RATE);
    checks++;
    if (rate < MIN_RATE) begin failures++; $display("FAIL message rate"); end
    checks++;
    if (n_exp < 1000) begin failures++; $display("FAIL load too light: %0d messages", n_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
