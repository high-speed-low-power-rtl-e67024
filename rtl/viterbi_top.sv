// viterbi_top: the convolutional encoder (transmit side) and the hybrid
// Viterbi decoder (receive side), side by side.
//
// The two halves share only clock and reset; they are joined by a channel
// outside this module (a loopback, a radio link, or a testbench that adds bit
// errors). Transmit side: enc_* ports of conv_encoder (one code word per
// accepted bit, K-1 flush code words after enc_in_last). Receive side: the
// decoder ports clk_enable, in1, ce_out, out1 (see viterbi_decoder for the
// timing: one symbol per enabled cycle, fixed latency REG_LEN + 3 enabled
// cycles). Default code: K = 3, rate 1/3, generators 111, 011, 101.
module viterbi_top
  import viterbi_pkg::*;
#(
  parameter int K       = K_DEFAULT,
  parameter int N       = N_DEFAULT,
  parameter logic [N-1:0][K-1:0] GEN = GEN_DEFAULT,
  parameter int BM_W    = BM_W_DEFAULT,
  parameter int PM_W    = PM_W_DEFAULT,
  parameter int REG_LEN = REG_LEN_DEFAULT
) (
  input  logic         clk,
  input  logic         reset,
  // transmit side
  input  logic         enc_in_valid,
  input  logic         enc_in_bit,
  input  logic         enc_in_last,
  output logic         enc_in_ready,
  output logic         enc_out_valid,
  output logic [N-1:0] enc_out_sym,
  output logic         enc_out_last,
  // receive side
  input  logic         clk_enable,
  input  logic [N-1:0] in1,
  output logic         ce_out,
  output logic         out1
);

  conv_encoder #(.K(K), .N(N), .GEN(GEN)) u_encoder (
    .clk      (clk),
    .reset    (reset),
    .in_valid (enc_in_valid),
    .in_bit   (enc_in_bit),
    .in_last  (enc_in_last),
    .in_ready (enc_in_ready),
    .out_valid(enc_out_valid),
    .out_sym  (enc_out_sym),
    .out_last (enc_out_last)
  );

  viterbi_decoder #(
    .K(K), .N(N), .GEN(GEN), .BM_W(BM_W), .PM_W(PM_W), .REG_LEN(REG_LEN)
  ) u_decoder (
    .clk       (clk),
    .reset     (reset),
    .clk_enable(clk_enable),
    .in1       (in1),
    .ce_out    (ce_out),
    .out1      (out1)
  );

endmodule
