// conv_encoder: rate 1/N convolutional encoder with flush-bit termination.
//
// Each accepted input bit m1 is combined with the K-1 memory registers
// (m0, m-1, ... ; all cleared by reset) by N modulo-2 adders, one per
// generator polynomial, giving one N-bit code word. Then the registers shift
// (m1 -> m0 -> m-1). After the bit flagged in_last the encoder keeps shifting
// zeros for K-1 more code words, so the registers return to the all-zero
// state; in_ready is low during this flush. The default code (K = 3, rate 1/3,
// G = 111, 011, 101) and the flush-to-zero termination follow the encoder
// description; the valid/ready/last handshake is this design's own.
//
// Timing: one code word per clock. out_sym/out_valid are registered: a bit
// accepted in cycle t gives its code word in cycle t+1. out_last marks the
// final flush code word.
module conv_encoder
  import viterbi_pkg::*;
#(
  parameter int K = K_DEFAULT,
  parameter int N = N_DEFAULT,
  parameter logic [N-1:0][K-1:0] GEN = GEN_DEFAULT
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_valid,
  input  logic         in_bit,
  input  logic         in_last,
  output logic         in_ready,
  output logic         out_valid,
  output logic [N-1:0] out_sym,
  output logic         out_last
);

  localparam int M = K - 1;
  localparam int FCW = $clog2(M + 1);

  logic [M-1:0]   mem_q;        // m0 in the MSB, oldest register in bit 0
  logic [FCW-1:0] flush_left_q; // zero bits still to shift in
  logic           flushing;
  logic           step;
  logic           bit_in;
  logic [K-1:0]   taps;
  logic [N-1:0]   cw;

  assign flushing = (flush_left_q != '0);
  assign in_ready = !flushing;
  assign step     = flushing || in_valid;
  assign bit_in   = flushing ? 1'b0 : in_bit;
  assign taps     = {bit_in, mem_q};

  always_comb begin
    for (int i = 0; i < N; i++)
      cw[N-1-i] = ^(taps & GEN[N-1-i]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      mem_q        <= '0;
      flush_left_q <= '0;
      out_valid    <= 1'b0;
      out_sym      <= '0;
      out_last     <= 1'b0;
    end else begin
      out_valid <= step;
      out_last  <= 1'b0;
      if (step) begin
        out_sym <= cw;
        mem_q   <= taps[K-1:1];
        if (flushing) begin
          flush_left_q <= flush_left_q - 1'b1;
          out_last     <= (flush_left_q == FCW'(1));
        end else if (in_last) begin
          flush_left_q <= FCW'(M);
        end
      end
    end
  end

endmodule
