// tb_hybrid_unit: self-checking test of the hybrid survivor path unit
// (M = 2, REG_LEN = 16).
//
// The unit is fed, stage by stage, random decision vectors through a model of
// the survivor shift register and random best-state inputs, with random idle
// cycles. Every decision vector is kept here, and each output bit is checked
// against a plain full-length trace back: from the best state latched when
// the bit's group of M stages closed, follow the decisions back to the stage
// of the bit and read the input bit of the state reached. The output must
// appear exactly REG_LEN + 2 stages after its own stage, and the trace and
// store phases must each occur once every M stages.
module tb_hybrid_unit;
  localparam int M = 2, L = 16, STAGES = 2000;
  logic clk = 1'b0, reset = 1'b1, en;
  logic [1:0][3:0] sm;
  logic [1:0] best_state;
  logic out_bit, out_valid, trace_phase, store_phase;
  int checks = 0, failures = 0;
  logic [3:0] d [STAGES];
  logic [1:0] best_in [STAGES];
  int n_out = 0, n_trace = 0, n_store = 0;

  hybrid_unit dut (.*);

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

  function automatic logic ref_bit(input int i);
    int j;
    logic [1:0] st;
    j  = M * ((i + L - M) / M) + (M - 1);   // group holding bit i
    st = best_in[j + 1];
    for (int t = j; t >= i + 1; t--) st = {st[0], d[t][st]};
    return st[1];
  endfunction

  initial begin
    int t;
    en = 0; sm = '0; best_state = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    t = 0;
    while (t < STAGES) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        en = 0;
        best_state = 2'($urandom);
        sm = {4'($urandom), 4'($urandom)};  // must be ignored
        @(posedge clk);
        #1 check(!out_valid, "no output in an idle cycle");
        continue;
      end
      en = 1;
      d[t] = 4'($urandom);
      best_in[t] = 2'($urandom);
      best_state = best_in[t];
      sm[0] = (t >= 1) ? d[t-1] : 4'h0;
      sm[1] = (t >= 2) ? d[t-2] : 4'h0;
      #1;
      if (trace_phase) begin
        n_trace++;
        check(t % M == 0 && t > 0, "trace phase one stage after a group closes");
      end
      if (store_phase) begin
        n_store++;
        check(t % M == 1 && t > 1, "store phase right after the trace phase");
      end
      check(out_valid == (t >= L + 2), "out_valid from stage REG_LEN+2 on");
      if (out_valid) begin
        n_out++;
        check(out_bit == ref_bit(t - L - 2),
              $sformatf("decoded bit %0d exp %b got %b", t - L - 2, ref_bit(t - L - 2), out_bit));
      end
      @(posedge clk);
      t++;
    end
    check(n_trace == (STAGES - 1) / M, "trace phase count");
    check(n_store == (STAGES - 2) / M, "store phase count");
    $display("outputs %0d trace phases %0d store phases %0d", n_out, n_trace, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
