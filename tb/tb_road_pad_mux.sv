// tb_road_pad_mux: both multiplexer widths (5 pads from code-2, 6 pads from
// code-2) against a direct bit selection, including the row edges.
module tb_road_pad_mux;
  logic [95:0] pads;
  logic [6:0]  code;
  logic [4:0]  sel5;
  logic [5:0]  sel6;
  int checks = 0, failures = 0;

  road_pad_mux #(.N(96), .WIN(5), .OFS(-2)) dut5 (.pads, .code, .sel(sel5));
  road_pad_mux #(.N(96), .WIN(6), .OFS(-2)) dut6 (.pads, .code, .sel(sel6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] e5;
    logic [5:0] e6;
    for (int k = 0; k < 1000; k++) begin
      pads = {$urandom, $urandom, $urandom};
      code = 7'(k % 96);
      #1;
      for (int j = 0; j < 6; j++) begin
        int p;
        p = int'(code) - 2 + j;
        e6[j] = (p >= 0 && p <= 95) ? pads[p] : 1'b0;
        if (j < 5) e5[j] = e6[j];
      end
      checks += 2;
      if (sel5 !== e5) begin failures++; $display("FAIL 5 code=%0d", code); end
      if (sel6 !== e6) begin failures++; $display("FAIL 6 code=%0d", code); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
