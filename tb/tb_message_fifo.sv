// tb_message_fifo: random two-clock traffic, full, overflow and drain of a
// 256 x 80 dual-clock FIFO (write half period 20 ns, read 5 ns).
module tb_message_fifo;
  int checks, failures;
  logic done;

  fifo_tester #(.W(80), .D(256), .WP(20), .RP(5)) u_t (.checks, .failures, .done);

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
