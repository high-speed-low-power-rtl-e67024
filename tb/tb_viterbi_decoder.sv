// tb_viterbi_decoder: end-to-end test of the hybrid Viterbi decoder
// (K = 3, rate 1/3, REG_LEN = 16).
//
// A random message is encoded here (encoder equations written out), sent
// through a channel that flips received bits, and fed to the decoder with
// random cycles where clk_enable is low. Two runs:
//   1. sparse errors (one flipped bit at least 8 symbols from the next):
//      every decoded bit must equal the message bit;
//   2. dense errors (each received bit flipped with probability 1/4): the
//      decoder must agree bit for bit with an integer reference Viterbi
//      decoder kept here, which traces back from the best state over the whole
//      history.
// In both runs the decoded bit of the i-th enabled symbol must appear in the
// enabled cycle i + REG_LEN + 3, and ce_out must be low before that.
module tb_viterbi_decoder;
  localparam int L = 16, LAT = L + 3, M = 2, NBITS = 1500, NSYM = NBITS + LAT + 4;
  logic clk = 1'b0, reset = 1'b1, clk_enable;
  logic [2:0] in1;
  logic ce_out, out1;
  int checks = 0, failures = 0;
  int flips = 0, gaps = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [2:0] cw_of(input logic u, input logic [1:0] p);
    return {u ^ p[1] ^ p[0], p[1] ^ p[0], u ^ p[0]};
  endfunction

  logic       msg [NSYM];
  logic [2:0] rx  [NSYM];
  logic [3:0] d   [NSYM];
  logic [1:0] best_after [NSYM];
  logic       ref_out [NSYM];

  // Integer Viterbi reference over the whole received sequence.
  task automatic reference();
    int pmr [4];
    pmr = '{0, 32, 32, 32};
    for (int t = 0; t < NSYM; t++) begin
      int nr [4];
      int bv;
      for (int s = 0; s < 4; s++) begin
        logic [1:0] p0, p1;
        int s0, s1;
        p0 = {1'(s), 1'b0}; p1 = {1'(s), 1'b1};
        s0 = pmr[p0] + $countones(rx[t] ^ cw_of(1'(s >> 1), p0));
        s1 = pmr[p1] + $countones(rx[t] ^ cw_of(1'(s >> 1), p1));
        d[t][s] = (s1 < s0);
        nr[s] = d[t][s] ? s1 : s0;
      end
      pmr = nr;
      best_after[t] = 0; bv = pmr[0];
      for (int s = 1; s < 4; s++) if (pmr[s] < bv) begin bv = pmr[s]; best_after[t] = 2'(s); end
    end
    for (int i = 0; i + LAT < NSYM; i++) begin
      int j;
      logic [1:0] st;
      j  = M * ((i + L - M) / M) + (M - 1);
      st = best_after[j];
      for (int t = j; t >= i + 1; t--) st = {st[0], d[t][st]};
      ref_out[i] = st[1];
    end
  endtask

  task automatic run(input bit dense);
    logic [1:0] st;
    int since;
    int e;
    st = 0; since = 100;
    for (int t = 0; t < NSYM; t++) begin
      msg[t] = (t < NBITS) ? 1'($urandom) : 1'b0;
      rx[t]  = cw_of(msg[t], st);
      st     = {msg[t], st[1]};
      if (dense) begin
        for (int b = 0; b < 3; b++)
          if ($urandom_range(0, 3) == 0) begin rx[t][b] = ~rx[t][b]; flips++; end
      end else if (since >= 8 && $urandom_range(0, 3) == 0 && t < NBITS) begin
        automatic int fb = int'($urandom_range(0, 2));
        rx[t][fb] = ~rx[t][fb];
        flips++;
        since = 0;
      end else since++;
    end
    reference();
    reset = 1'b1; clk_enable = 0; in1 = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    e = 0;
    while (e < NSYM) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        clk_enable = 0; in1 = 3'($urandom); gaps++;
        #1 check(!ce_out, "ce_out low while clk_enable is low");
        continue;
      end
      clk_enable = 1;
      in1 = rx[e];
      #1;
      check(ce_out == (e >= LAT), "ce_out from enabled cycle REG_LEN+3 on");
      if (ce_out) begin
        int i;
        i = e - LAT;
        if (dense)
          check(out1 == ref_out[i], $sformatf("bit %0d exp %b (reference) got %b", i, ref_out[i], out1));
        else begin
          check(out1 == msg[i], $sformatf("bit %0d exp %b (message) got %b", i, msg[i], out1));
        end
      end
      e++;
    end
    @(negedge clk);
    clk_enable = 0;
  endtask

  initial begin
    clk_enable = 0; in1 = 0;
    run(1'b0);
    $display("sparse run: %0d channel bit flips, %0d enable gaps", flips, gaps);
    check(flips > 50, "sparse run injected errors");
    flips = 0;
    run(1'b1);
    $display("dense run: %0d channel bit flips", flips);
    check(flips > 100, "dense run injected errors");
    check(gaps > 50, "clock-enable gaps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
