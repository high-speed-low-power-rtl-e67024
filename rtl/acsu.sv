// acsu: add-compare-select unit for the whole trellis, with the path metric
// memory.
//
// One acs_unit per trellis state (2**(K-1) of them). State s has the two
// predecessors {s[K-3:0], b}, b = 0/1, reached with input bit s[K-2]; the
// expected code word of each branch is computed from the generator
// polynomials, and the branch metric of that code word is taken from the
// BMU's table. The new path metrics are stored in the path metric memory
// (registers) and the decision bits, one per state, are passed on to the
// survivor memory. best_state is the state with the smallest stored path
// metric (lowest index on a tie), needed by the hybrid unit to choose the
// output path. The ACS collection, the two-branch-metric/two-path-metric
// inputs of each ACS and the path metric memory follow the ACSU description;
// the reset values (state 0 at 0, the others at 2**(PM_W-3)), the modulo
// metric arithmetic and the best-state search are this design's own.
//
// Timing: dec is combinational from bm and the stored metrics; with en high
// the path metrics of the next trellis stage are written at the clock edge.
module acsu
  import viterbi_pkg::*;
#(
  parameter int K    = K_DEFAULT,
  parameter int N    = N_DEFAULT,
  parameter logic [N-1:0][K-1:0] GEN = GEN_DEFAULT,
  parameter int BM_W = BM_W_DEFAULT,
  parameter int PM_W = PM_W_DEFAULT
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic                        en,
  input  logic [2**N-1:0][BM_W-1:0]   bm,
  output logic [2**(K-1)-1:0]         dec,
  output logic [2**(K-1)-1:0][PM_W-1:0] pm,
  output logic [K-2:0]                best_state
);

  localparam int M = K - 1;
  localparam int S = 2**M;
  localparam logic [PM_W-1:0] INIT_OFFSET = PM_W'(1) << (PM_W - 3);

  // Code word emitted on the branch from predecessor p with input bit u.
  function automatic logic [N-1:0] branch_cw(input logic [M-1:0] p, input logic u);
    logic [K-1:0] taps;
    logic [N-1:0] cw;
    taps = {u, p};
    for (int i = 0; i < N; i++)
      cw[i] = ^(taps & GEN[i]);
    return cw;
  endfunction

  logic [S-1:0][PM_W-1:0] pm_next;

  for (genvar s = 0; s < S; s++) begin : g_acs
    // predecessors {s[M-2:0], b}
    localparam logic [M-1:0] P0 = M'((2 * s) % S);
    localparam logic [M-1:0] P1 = M'((2 * s + 1) % S);
    localparam logic         U  = 1'(s >> (M - 1));
    localparam logic [N-1:0] CW0 = branch_cw(P0, U);
    localparam logic [N-1:0] CW1 = branch_cw(P1, U);

    acs_unit #(.BM_W(BM_W), .PM_W(PM_W)) u_acs (
      .pm0   (pm[P0]),
      .pm1   (pm[P1]),
      .bm0   (bm[CW0]),
      .bm1   (bm[CW1]),
      .pm_new(pm_next[s]),
      .dec   (dec[s])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int s = 0; s < S; s++)
        pm[s] <= (s == 0) ? '0 : INIT_OFFSET;
    end else if (en) begin
      pm <= pm_next;
    end
  end

  // Smallest stored path metric (modulo compare).
  always_comb begin
    logic [PM_W-1:0] best_pm;
    best_state = '0;
    best_pm    = pm[0];
    for (int s = 1; s < S; s++) begin
      if (pm_less(32'(pm[s]), 32'(best_pm), PM_W)) begin
        best_pm    = pm[s];
        best_state = M'(s);
      end
    end
  end

endmodule
