// viterbi_pkg: code definition and helpers shared by the encoder and the
// hybrid Viterbi decoder.
//
// The default code is the rate-1/3, constraint-length-3 convolutional code
// with generator polynomials G1 = (1,1,1), G2 = (0,1,1), G3 = (1,0,1). A
// generator is written MSB first in the order (m1, m0, m-1): bit K-1 taps the
// newest input bit m1, bit 0 taps the oldest register m-1.
//
// Trellis convention used throughout: the encoder state is the K-1 most recent
// input bits, newest in the MSB. From state p an input bit u leads to state
// {u, p[K-2:1]}; so a state s has the two predecessors {s[K-3:0], b} for
// b = 0/1, the dropped bit b is the ACS decision bit, and the input bit that
// led into s is s[K-2]. Code words are packed with n1 in the MSB.
//
// Path metrics are unsigned numbers compared modulo 2**PM_W (the difference
// read as a two's-complement number), so they may wrap around freely; this
// replaces explicit metric normalisation.
package viterbi_pkg;

  // Code of the encoder figure: K = 3, rate 1/N = 1/3.
  localparam int K_DEFAULT = 3;
  localparam int N_DEFAULT = 3;
  localparam logic [N_DEFAULT-1:0][K_DEFAULT-1:0] GEN_DEFAULT = {3'b111, 3'b011, 3'b101};

  // Branch metric width: the branch metric counter is 3 bits wide.
  localparam int BM_W_DEFAULT = 3;
  // Path metric width (own choice).
  localparam int PM_W_DEFAULT = 8;
  // Length of each state's partially-decoded register (own choice, about 5*K
  // rounded up to a multiple of K-1).
  localparam int REG_LEN_DEFAULT = 16;

  // a < b for path metrics that wrap modulo 2**PM_W.
  function automatic logic pm_less(input logic [31:0] a, input logic [31:0] b, input int w);
    logic [31:0] d;
    d = (a - b) & ((32'd1 << w) - 32'd1);
    return d[w-1];
  endfunction

endpackage
