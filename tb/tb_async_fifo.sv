// tb_async_fifo: random two-clock traffic, full, overflow and drain of a
// 512 x 297 dual-clock FIFO (write half period 24 ns, read 20 ns).
module tb_async_fifo;
  int checks, failures;
  logic done;

  fifo_tester #(.W(297), .D(512), .WP(24), .RP(20)) u_t (.checks, .failures, .done);

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
