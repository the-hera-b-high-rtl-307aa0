// tb_lut_sram: random writes into the 256K x 64 table, read back through
// both asynchronous ports against a sparse reference.
module tb_lut_sram;
  logic clk = 0, we = 0;
  logic [17:0] waddr = '0, ra = '0, rb = '0;
  logic [63:0] wdata = '0, da, db;
  logic [63:0] refm [logic [17:0]];
  int checks = 0, failures = 0;

  lut_sram dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));
  always #20 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] keys [$];
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1;
      waddr = (k < 4) ? 18'(k * 18'h3ffff / 3) : 18'($urandom);
      wdata = {$urandom, $urandom};
      refm[waddr] = wdata;
      keys.push_back(waddr);
    end
    @(negedge clk);
    we = 0;
    foreach (keys[i]) begin
      ra = keys[i];
      rb = keys[keys.size() - 1 - i];
      #1;
      checks += 2;
      if (da !== refm[ra] || db !== refm[rb]) begin failures++; $display("FAIL read %h", ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
