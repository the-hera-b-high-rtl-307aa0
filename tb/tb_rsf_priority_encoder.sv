// tb_rsf_priority_encoder: random and single-bit patterns against a scan
// from the top bit down.
module tb_rsf_priority_encoder;
  logic [95:0] rsf;
  logic [6:0]  code;
  logic        valid;
  int checks = 0, failures = 0;

  rsf_priority_encoder dut (.rsf, .code, .valid);

  function automatic int ref_code(logic [95:0] v);
    for (int i = 95; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    for (int k = 0; k < 2000; k++) begin
      case (k % 4)
        0: rsf = {$urandom, $urandom, $urandom};
        1: rsf = 96'd1 << ($urandom % 96);
        2: rsf = ({$urandom, $urandom, $urandom}) >> ($urandom % 96);
        default: rsf = (k % 400 == 3) ? '0 : (96'd1 << ($urandom % 96)) | 96'd1;
      endcase
      #1;
      r = ref_code(rsf);
      checks++;
      if (r < 0 ? valid : (!valid || code != 7'(r))) begin
        failures++;
        $display("FAIL rsf=%h code=%0d valid=%0d exp %0d", rsf, code, valid, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
