// mg_handshake: Handshake Logic and Data Input Register of the Message Generator.
//
// Each PTB signals a waiting data set with its DAV line. The eight DAV flags
// are copied into the input register of an 8-bit encoder whenever that
// register is empty. While it holds flags, the encoder picks the highest-
// numbered PTB, raises its DAC line for one 40 ns cycle (the PTB then drives
// the shared 27-bit bus) and, at the end of that cycle, stores the data set
// with the 3-bit PTB code in the 30-bit Data Input Register and clears the
// flag. When all flags are served the next DAV pattern is taken, so every
// PTB gets its turn once per pattern. This follows the document; the
// back-pressure (DAC only when the Data Input Register is free) and the test
// register injection port are this design's choices.
// Test mode: no DAC is issued and test_load places test_data (PTB code and
// data set) in the Data Input Register; test_taken pulses when it is used.
module mg_handshake
  import hpt_pkg::*;
#(
  parameter int unsigned N_PTB = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_PTB-1:0] dav,
  output logic [N_PTB-1:0] dac,
  input  dataset_t         bus_data,
  input  logic             test_mode,
  input  logic             test_load,
  input  mg_in_t           test_data,
  output logic             test_taken,
  output logic             dir_valid,
  output mg_in_t           dir_data,
  input  logic             dir_ready
);
  logic [N_PTB-1:0] enc_q;
  logic [2:0]       sel;
  logic             dir_free, grant;

  always_comb begin
    sel = '0;
    for (int i = 0; i < int'(N_PTB); i++)
      if (enc_q[i]) sel = 3'(i);
  end

  assign dir_free   = !dir_valid || dir_ready;
  assign grant      = (enc_q != '0) && dir_free && !test_mode;
  assign dac        = grant ? (N_PTB'(1) << sel) : '0;
  assign test_taken = test_mode && test_load && dir_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_q     <= '0;
      dir_valid <= 1'b0;
      dir_data  <= '0;
    end else begin
      if (test_mode)         enc_q <= '0;
      else if (enc_q == '0)  enc_q <= dav;
      else if (grant)        enc_q[sel] <= 1'b0;

      if (grant) begin
        dir_valid <= 1'b1;
        dir_data  <= '{ptb: sel, ds: bus_data};
      end else if (test_taken) begin
        dir_valid <= 1'b1;
        dir_data  <= test_data;
      end else if (dir_ready) begin
        dir_valid <= 1'b0;
      end
    end
  end

  a_one_dac: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dac));
endmodule
