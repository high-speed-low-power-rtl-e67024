// hybrid_unit: hybrid trace-back / register-exchange survivor path unit.
//
// Every trellis state s owns a REG_LEN-bit register holding the partially
// decoded input bits of its survivor path (bit 0 newest). A pure register
// exchange decoder would copy these registers every trellis stage. Here the
// copy happens only once every M = K-1 stages, using the property that after
// M stages the state bits of a state are its last M input bits, whatever
// state the path started in:
//
//   phase A (trace back): for every state s, follow the M decision vectors
//     held in the survivor memory backwards from s to find the state ptr[s]
//     the survivor of s occupied M stages earlier;
//   phase B (store): reg[s] <= {reg[ptr[s]] shifted up by M, the M state bits
//     of s in time order}.
//
// Each phase takes one clock cycle, so the survivor registers switch once per
// M stages instead of every stage. In phase B the oldest M bits of the new
// register of the best state (the one with the smallest path metric when the
// group of M stages closed) are loaded into an output buffer, which hands out
// one decoded bit per stage, oldest first. The trace-back-then-store
// structure in two clock cycles and the M-stage copy follow the hybrid method
// description; the register length, best-state output selection and output
// buffer are this design's own.
//
// Interface: en marks a trellis stage (the same cycle the ACSU and SMU
// advance). sm are the survivor memory contents before that edge, best_state
// the ACSU's best state before that edge.
// Timing: the decoded bit of stage i is on out_bit, with out_valid high, in
// the stage numbered i + REG_LEN + 2 (stages counted from 0 after reset).
module hybrid_unit #(
  parameter int M       = 2,
  parameter int REG_LEN = 16
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic                      en,
  input  logic [M-1:0][2**M-1:0]    sm,
  input  logic [M-1:0]              best_state,
  output logic                      out_bit,
  output logic                      out_valid,
  // observation of the two phases, for test and monitoring
  output logic                      trace_phase,
  output logic                      store_phase
);

  localparam int S   = 2**M;
  localparam int CW  = $clog2(M + 1);
  localparam int LAT = REG_LEN + 2;
  localparam int SCW = $clog2(LAT + 1);

  logic [CW-1:0]               grp_cnt_q;    // stages in the current group
  logic                        grp_done_q;   // a group of M stages just closed
  logic                        store_q;      // phase B pending
  logic [S-1:0][M-1:0]         ptr_q;        // ancestors found in phase A
  logic [M-1:0]                best_q;
  logic [S-1:0][REG_LEN-1:0]   regs_q;
  logic [M-1:0]                obuf_q;       // oldest bit in the MSB
  logic [SCW-1:0]              stage_cnt_q;

  logic [S-1:0][M-1:0]         ptr_d;
  logic [S-1:0][REG_LEN-1:0]   regs_d;

  assign trace_phase = en && grp_done_q;
  assign store_phase = en && store_q;

  // Phase A: trace back M stages from every state.
  always_comb begin
    for (int s = 0; s < S; s++) begin
      logic [M-1:0] st;
      st = M'(s);
      for (int k = 0; k < M; k++)
        st = M'((2 * int'(st) + int'(sm[k][st])) % S);   // {st[M-2:0], decision}
      ptr_d[s] = st;
    end
  end

  // Phase B: copy the ancestor's register and append the state bits.
  always_comb begin
    for (int s = 0; s < S; s++) begin
      logic [M-1:0] sb;
      for (int k = 0; k < M; k++)
        sb[k] = 1'(s >> (M - 1 - k));   // bit 0 = newest input bit = s[M-1]
      if (REG_LEN > M)
        regs_d[s] = {regs_q[ptr_q[s]][REG_LEN-M-1:0], sb};
      else
        regs_d[s] = REG_LEN'(sb);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      grp_cnt_q   <= '0;
      grp_done_q  <= 1'b0;
      store_q     <= 1'b0;
      ptr_q       <= '0;
      best_q      <= '0;
      regs_q      <= '0;
      obuf_q      <= '0;
      stage_cnt_q <= '0;
    end else if (en) begin
      // group bookkeeping
      if (grp_cnt_q == CW'(M - 1)) begin
        grp_cnt_q  <= '0;
        grp_done_q <= 1'b1;
      end else begin
        grp_cnt_q  <= grp_cnt_q + 1'b1;
        grp_done_q <= 1'b0;
      end
      // phase A
      store_q <= grp_done_q;
      if (grp_done_q) begin
        ptr_q  <= ptr_d;
        best_q <= best_state;
      end
      // phase B and output buffer
      if (store_q) begin
        regs_q <= regs_d;
        obuf_q <= regs_d[best_q][REG_LEN-1 -: M];
      end else begin
        obuf_q <= obuf_q << 1;
      end
      if (stage_cnt_q != SCW'(LAT))
        stage_cnt_q <= stage_cnt_q + 1'b1;
    end
  end

  assign out_bit   = obuf_q[M-1];
  assign out_valid = en && (stage_cnt_q == SCW'(LAT));

endmodule
