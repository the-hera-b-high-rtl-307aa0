// fifo_tester: drives one async_fifo with random writes and reads on two
// clocks, checks order and contents against a queue, fills it to full to
// check full and overflow, and drains it to empty.
module fifo_tester #(
  parameter int unsigned W  = 297,
  parameter int unsigned D  = 512,
  parameter int unsigned WP = 24,     // half periods
  parameter int unsigned RP = 20
) (
  output int checks,
  output int failures,
  output logic done
);
  logic wclk = 0, rclk = 0, rst_n = 0, we = 0, re = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic wfull, overflow, rempty;
  logic [W-1:0] q [$];

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wclk, .wrst_n(rst_n), .we, .wdata, .wfull, .overflow,
    .rclk, .rrst_n(rst_n), .re, .rdata, .rempty);

  always #(WP) wclk = ~wclk;
  always #(RP) rclk = ~rclk;

  function automatic logic [W-1:0] rword();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;  // upper bits truncate
    return v;
  endfunction

  int n_read = 0;
  logic writing = 1, reading = 1;
  int wprob = 50, rprob = 50;

  initial begin
    checks = 0; failures = 0; done = 0;
  end

  // writer
  always @(negedge wclk) begin
    if (rst_n && writing && !wfull && ($urandom % 100) < wprob) begin
      we <= 1;
      wdata <= rword();
    end else begin
      we <= 0;
    end
  end
  always @(posedge wclk) if (rst_n && we && !wfull) q.push_back(wdata);

  // reader
  always @(negedge rclk) re <= rst_n && reading && !rempty && ($urandom % 100) < rprob;
  always @(posedge rclk) begin
    if (rst_n && re && !rempty) begin
      checks++;
      if (q.size() == 0 || rdata !== q[0]) begin
        failures++;
        $display("FAIL fifo data mismatch at word %0d", n_read);
      end
      if (q.size() != 0) void'(q.pop_front());
      n_read++;
    end
  end

  initial begin
    #(10*WP) rst_n = 1;
    // random traffic
    #(4000*WP);
    // fill to full
    reading = 0; wprob = 100;
    #((4*D + 100) * 2 * WP);
    checks++;
    if (!wfull || q.size() != D) begin failures++; $display("FAIL not full: %0d words", q.size()); end
    @(negedge wclk);
    writing = 0;
    #1 force we = 1'b1;
    @(negedge wclk);
    release we;
    @(posedge wclk); #1;
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    // drain
    rprob = 100; reading = 1;
    #((2*D + 100) * 2 * RP);
    checks++;
    if (!rempty || q.size() != 0) begin failures++; $display("FAIL not empty after drain"); end
    checks++;
    if (n_read < D) begin failures++; $display("FAIL too few words read %0d", n_read); end
    done = 1;
  end
endmodule
