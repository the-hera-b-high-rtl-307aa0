// tb_test_fifo_mg: random two-clock traffic, full, overflow and drain of a
// 512 x 20 dual-clock FIFO (write half period 5 ns, read 20 ns).
module tb_test_fifo_mg;
  int checks, failures;
  logic done;

  fifo_tester #(.W(20), .D(512), .WP(5), .RP(20)) u_t (.checks, .failures, .done);

  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
