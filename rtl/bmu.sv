// bmu: branch metric unit for hard-decision decoding.
//
// The received N-bit symbol is XORed with each of the 2**N possible code
// words, and the number of differing bits (the Hamming distance) is the branch
// metric for that code word. bm[c] is the metric of code word c. The
// XOR-and-count structure follows the branch metric unit description; the
// count is formed here as a combinational population count into a BM_W-bit
// (3-bit) result rather than with a ripple counter clocked by flip-flop
// outputs, so the whole decoder stays on one clock.
//
// Timing: registered. A symbol presented with en high in cycle t gives its
// metrics on bm from cycle t+1; with en low the outputs hold.
module bmu
  import viterbi_pkg::*;
#(
  parameter int N    = N_DEFAULT,
  parameter int BM_W = BM_W_DEFAULT
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic                      en,
  input  logic [N-1:0]              rx_sym,
  output logic [2**N-1:0][BM_W-1:0] bm
);

  logic [2**N-1:0][BM_W-1:0] bm_d;

  always_comb begin
    for (int c = 0; c < 2**N; c++) begin
      logic [N-1:0] diff;
      diff    = rx_sym ^ N'(c);
      bm_d[c] = '0;
      for (int i = 0; i < N; i++)
        bm_d[c] = bm_d[c] + BM_W'(diff[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (reset)   bm <= '0;
    else if (en) bm <= bm_d;
  end

endmodule
