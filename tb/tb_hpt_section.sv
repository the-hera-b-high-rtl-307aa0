// tb_hpt_section: end-to-end run of one trigger section at its full size
// (16 Link Boards, 8 Pretrigger Boards, one Message Generator). The
// testbench stands in for the Autobahn/optical links (one 48 ns cycle of
// delay, link channel g = link*8 + ptb on board g/3, channel g%3), for the
// calorimeter veto and for the Track Finding Units. Random detector rows
// go in, two rows per 96 ns bunch crossing; every 80-bit message coming out
// must be one the reference model expects (road search, data sets, pad
// pairs, look-up table pattern), and all expected messages must arrive.
// It also counts how often each mechanism happened: roads, events with
// several data sets, the per-event limit, several PTBs waiting at once,
// extra messages from M. Msg, veto, TFU disable; one that never happened
// counts as a failure. Bunch Number errors must stay clear.
module tb_hpt_section;
  import hpt_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = 8, NLB = 16;
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
  int c_roads = 0, c_multi_set = 0, c_limited = 0, c_multi_dav = 0, c_mmsg = 0, c_veto = 0, c_tfu_off = 0;
  int expm [logic [79:0]];
  logic [79:0] asm_w;
  logic written [logic [17:0]];
  logic [14:0] konst = 15'h2b3c;
  localparam int VETO_BUNCH = 37;

  hpt_section dut (.clk48, .rst48_n(rst_n), .clk25, .rst25_n(rst_n), .clk100, .rst100_n(rst_n),
    .bx, .bn, .lb_row_m, .lb_row_m1, .lb_tx, .ptb_rx, .veto_we, .veto_bn,
    .tfu_en, .tfu_data, .tfu_valid, .tfu_first,
    .vme_slot, .vme_addr, .vme_wdata, .vme_we, .vme_re, .vme_rdata, .irq);

  always #24 clk48 = ~clk48;
  always #20 clk25 = ~clk25;
  always #5  clk100 = ~clk100;

  // Autobahn transmitter, fibre and receiver: one 48 ns cycle
  always @(posedge clk48)
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < 6; l++)
        for (int t = 0; t < 2; t++)
          ptb_rx[p][2*l+t] <= lb_tx[(l*NP+p)/3][(l*NP+p)%3][t];

  // several PTBs waiting at once
  always @(posedge clk25) if (rst_n && $countones(dut.dav) > 1) c_multi_dav++;
  always @(posedge clk100) if (rst_n && !tfu_en && dut.u_mg.u_mux.msg_empty == 1'b0) c_tfu_off++;

  always @(posedge clk100) begin
    if (rst_n && tfu_valid) begin
      checks++;
      if (tfu_first != (part == 0)) begin failures++; $display("FAIL framing"); end
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

  function automatic logic [63:0] lut_f(logic [17:0] a);
    logic [63:0] v;
    v = {6'd0, 1'b0, 18'(a * 18'd52711), a, 3'd5, a};
    v[57] = (a[17:16] == 2'd0 && a[2:0] == 3'd3);
    return v;
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

  function automatic logic [95:0] rnd(int d);
    logic [95:0] v;
    for (int i = 0; i < 96; i++) v[i] = ($urandom % 64) < d;
    return v;
  endfunction

  // detector data: [crossing][ptb][row][layer]
  localparam int NBX = 160;
  logic [95:0] det [NBX][NP][2][3];

  task automatic plan_row(int x, int p, int r);
    event_t e;
    dataset_t sets [$];
    int maxs;
    e.rsf = ref_rsf(det[x][p][r][0], det[x][p][r][1], det[x][p][r][2]);
    if (e.rsf == '0) return;
    c_roads++;
    if (x == VETO_BUNCH) begin c_veto++; return; end
    e.pt2 = det[x][p][r][1]; e.pt3 = det[x][p][r][2];
    e.bn = 8'(x); e.cb = 1'(r);
    maxs = (p == 1) ? 2 : 0;
    if ($countones(e.rsf) > 1) c_multi_set++;
    if (maxs != 0 && $countones(e.rsf) > maxs) c_limited++;
    ref_sets(e, maxs, sets);
    foreach (sets[i]) begin
      int codes [$];
      ref_codes(sets[i], codes);
      foreach (codes[j])
        for (int m = 0; m < 4; m++) begin
          lut_addr_t a;
          logic [63:0] v;
          logic [79:0] msg;
          a = '{mmsg: 2'(m), cb: sets[i].cb, ptb: 3'(p), code: sets[i].code, road: 5'(codes[j])};
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
          if (m > 0) c_mmsg++;
          if (!v[57]) break;
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
    for (int b = 0; b < NLB; b++)
      for (int c = 0; c < 3; c++) begin lb_row_m[b][c] = '0; lb_row_m1[b][c] = '0; end
    for (int p = 0; p < NP; p++) for (int t = 0; t < 12; t++) ptb_rx[p][t] = '0;
    repeat (4) @(posedge clk25);
    rst_n = 1;
    // settings: constant bits, per-event limit 2 on PTB 1, veto of one bunch
    wr(4'd8, 8'h08, 32'(konst));
    wr(4'd1, 8'h00, 32'h0000_0200);
    @(negedge clk25); veto_we = 1; veto_bn = 8'(VETO_BUNCH);
    @(negedge clk25); veto_we = 0;
    // detector data and expectations (loads the table)
    for (int x = 0; x < NBX; x++)
      for (int p = 0; p < NP; p++)
        for (int r = 0; r < 2; r++) begin
          int dens;
          dens = (x % 8 == 0) ? 14 : 4;
          for (int L = 0; L < 3; L++) det[x][p][r][L] = rnd(dens);
          plan_row(x, p, r);
        end
    // run the crossings: bx every second 48 ns cycle
    fork
      for (int k = 0; k < 30000; k++) begin
        @(negedge clk100);
        tfu_en = (k % 200) < 150;
      end
    join_none
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
    repeat (40000) begin
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
    checks++;
    if (irq) begin failures++; $display("FAIL interrupt"); end
    $display("roads %0d, events with several data sets %0d, limited %0d, several DAV %0d, M.Msg extra %0d, vetoed %0d, TFU-disabled cycles %0d, messages %0d",
             c_roads, c_multi_set, c_limited, c_multi_dav, c_mmsg, c_veto, c_tfu_off, n_got);
    checks++;
    if (c_roads == 0 || c_multi_set == 0 || c_limited == 0 || c_multi_dav == 0 || c_mmsg == 0 || c_veto == 0 || c_tfu_off == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
