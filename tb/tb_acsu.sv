// tb_acsu: self-checking test of the ACS unit collection with its path
// metric memory (K = 3, rate 1/3, 4 states).
//
// Random received symbols are turned into branch metric tables here, and an
// integer reference of the Viterbi recursion (no wrap-around, expected code
// words from the encoder equations) predicts, every trellis stage, the four
// decision bits, the stored path metrics modulo 256 and the best state.
// Long runs make the hardware metrics wrap around many times.
module tb_acsu;
  logic clk = 1'b0, reset = 1'b1, en;
  logic [7:0][2:0] bm;
  logic [3:0] dec;
  logic [3:0][7:0] pm;
  logic [1:0] best_state;
  int checks = 0, failures = 0;
  int pmref [4];
  int wraps = 0;

  acsu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [2:0] cw_of(input logic u, input logic [1:0] p);
    // m1 = u, m0 = p[1], m-1 = p[0]
    return {u ^ p[1] ^ p[0], p[1] ^ p[0], u ^ p[0]};
  endfunction

  initial begin
    en = 0; bm = '0;
    pmref[0] = 0; pmref[1] = 32; pmref[2] = 32; pmref[3] = 32;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [2:0] rx;
      int nref [4];
      logic [3:0] dref;
      int bestv, besti;
      @(negedge clk);
      en = 1'($urandom_range(0, 4) != 0);
      rx = 3'($urandom);
      for (int c = 0; c < 8; c++) bm[c] = 3'($countones(rx ^ 3'(c)));
      // best state of the stored metrics
      besti = 0; bestv = pmref[0];
      for (int s = 1; s < 4; s++) if (pmref[s] < bestv) begin bestv = pmref[s]; besti = s; end
      #1;
      check(best_state == 2'(besti), $sformatf("best state exp %0d got %0d", besti, best_state));
      for (int s = 0; s < 4; s++) begin
        logic [1:0] p0, p1;
        logic u;
        int s0, s1;
        p0 = {1'(s), 1'b0}; p1 = {1'(s), 1'b1}; u = 1'(s >> 1);
        s0 = pmref[p0] + int'(bm[cw_of(u, p0)]);
        s1 = pmref[p1] + int'(bm[cw_of(u, p1)]);
        dref[s] = (s1 < s0);
        nref[s] = dref[s] ? s1 : s0;
      end
      check(dec == dref, $sformatf("decisions exp %b got %b", dref, dec));
      @(posedge clk);
      if (en) begin
        for (int s = 0; s < 4; s++) begin
          if ((nref[s] >> 8) != (pmref[s] >> 8)) wraps++;
          pmref[s] = nref[s];
        end
      end
      #1;
      for (int s = 0; s < 4; s++)
        check(pm[s] == 8'(pmref[s]), $sformatf("pm[%0d] exp %0d got %0d", s, pmref[s] & 255, pm[s]));
    end
    check(wraps > 0, "path metrics wrapped at least once");
    $display("path metric wraps seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
