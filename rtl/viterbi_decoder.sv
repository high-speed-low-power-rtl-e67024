// viterbi_decoder: hard-decision Viterbi decoder using the hybrid
// (trace-back plus register-exchange) survivor path method.
//
// Datapath, in the order of the decoder block diagram:
//   in1 -> BMU (Hamming distance to every code word, registered)
//       -> ACSU (add-compare-select per state, path metric memory)
//       -> SMU (K-1 deep shift register of decision vectors)
//       -> hybrid unit (M-stage trace back, M-stage register copy, output)
//       -> out1
// The port names clk, reset, clk_enable, in1, ce_out and out1 follow the
// published schematic and waveform. clk_enable is a global clock enable: each
// cycle with clk_enable high accepts one received N-bit symbol on in1 and
// advances the whole pipeline by one step. ce_out is high when out1 carries a
// decoded bit. The decoder runs continuously; to get the last bits of a
// message out, keep supplying symbols (for example the encoder's flush code
// words followed by zero symbols).
//
// The ACSU's path metric output and the hybrid unit's phase strobes are
// observation ports for testing and are left open here.
//
// Timing: one symbol in and, once the pipeline is full, one decoded bit out
// per enabled cycle. The bit of the symbol given in the i-th enabled cycle
// appears on out1 in enabled cycle i + LATENCY, LATENCY = REG_LEN + 3
// (one BMU register stage plus the hybrid unit's REG_LEN + 2).
module viterbi_decoder
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
  input  logic         clk_enable,
  input  logic [N-1:0] in1,
  output logic         ce_out,
  output logic         out1
);

  localparam int M = K - 1;
  localparam int S = 2**M;

  logic [2**N-1:0][BM_W-1:0] bm;
  logic                      bm_valid_q;  // bm holds a received symbol
  logic                      step;
  logic [S-1:0]              dec;
  logic [M-1:0]              best_state;
  logic [M-1:0][S-1:0]       sm;

  bmu #(.N(N), .BM_W(BM_W)) u_bmu (
    .clk   (clk),
    .reset (reset),
    .en    (clk_enable),
    .rx_sym(in1),
    .bm    (bm)
  );

  always_ff @(posedge clk) begin
    if (reset)           bm_valid_q <= 1'b0;
    else if (clk_enable) bm_valid_q <= 1'b1;
  end

  assign step = clk_enable && bm_valid_q;

  acsu #(.K(K), .N(N), .GEN(GEN), .BM_W(BM_W), .PM_W(PM_W)) u_acsu (
    .clk       (clk),
    .reset     (reset),
    .en        (step),
    .bm        (bm),
    .dec       (dec),
    .pm        (),
    .best_state(best_state)
  );

  smu #(.S(S), .DEPTH(M)) u_smu (
    .clk   (clk),
    .reset (reset),
    .en    (step),
    .dec_in(dec),
    .sm    (sm)
  );

  hybrid_unit #(.M(M), .REG_LEN(REG_LEN)) u_hybrid (
    .clk        (clk),
    .reset      (reset),
    .en         (step),
    .sm         (sm),
    .best_state (best_state),
    .out_bit    (out1),
    .out_valid  (ce_out),
    .trace_phase(),
    .store_phase()
  );

endmodule
