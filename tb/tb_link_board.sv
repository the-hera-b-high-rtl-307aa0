// tb_link_board: drives different half rows into the three channels of a
// Link Board and checks every channel's two words for both rows.
module tb_link_board;
  import hpt_pkg::*;
  logic clk = 0, rst_n = 0, bx = 0;
  logic [47:0] row_m [3], row_m1 [3];
  logic [7:0]  bn = '0;
  ab_word_t    tx [3][2];
  int checks = 0, failures = 0;

  link_board dut (.clk, .rst_n, .bx, .bn, .row_m, .row_m1, .tx_word(tx));

  always #24 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] em [3], em1 [3];
    logic [7:0]  eb;
    for (int c = 0; c < 3; c++) begin row_m[c] = '0; row_m1[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      eb = 8'($urandom);
      for (int c = 0; c < 3; c++) begin
        em[c] = {$urandom, $urandom}; em1[c] = {$urandom, $urandom};
      end
      @(negedge clk);
      bx = 1; row_m = em; row_m1 = em1; bn = eb;
      @(negedge clk);
      bx = 0;
      for (int c = 0; c < 3; c++) begin
        checks += 2;
        if (tx[c][0] !== {1'b0, eb[0], em[c][29:0]} || tx[c][1] !== {1'b0, 5'd0, eb, em[c][47:30]}) begin
          failures++; $display("FAIL ch%0d row m", c);
        end
      end
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        checks += 2;
        if (tx[c][0] !== {1'b1, eb[0], em1[c][29:0]} || tx[c][1] !== {1'b1, 5'd0, eb, em1[c][47:30]}) begin
          failures++; $display("FAIL ch%0d row m+1", c);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
