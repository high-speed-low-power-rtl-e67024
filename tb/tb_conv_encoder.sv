// tb_conv_encoder: self-checking test of conv_encoder (K = 3, rate 1/3).
//
// Sends random messages of random length, each closed with in_last, with
// random idle cycles in between. A reference written directly from the
// encoder equations (n1 = m1+m0+m-1, n2 = m0+m-1, n3 = m1+m-1, modulo 2)
// predicts every code word, including the two flush code words after each
// message; in_ready must be low during the flush and out_last must mark the
// last flush word. Each code word must appear exactly one cycle after its bit
// was accepted.
module tb_conv_encoder;
  logic clk = 1'b0, reset = 1'b1;
  logic in_valid, in_bit, in_last, in_ready, out_valid, out_last;
  logic [2:0] out_sym;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state: r0 = m0, r1 = m-1
  logic r0, r1;
  logic [2:0] exp_sym;
  logic       exp_valid, exp_last;
  int         flush_left;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    in_valid = 0; in_bit = 0; in_last = 0;
    r0 = 0; r1 = 0; flush_left = 0; exp_valid = 0; exp_last = 0; exp_sym = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int msg = 0; msg < 40; msg++) begin
      automatic int len = 1 + int'($urandom_range(0, 30));
      for (int i = 0; i < len + 2; i++) begin
        logic m1;
        bit   idle;
        idle = ($urandom_range(0, 3) == 0) && flush_left == 0;
        @(negedge clk);
        if (flush_left > 0) begin
          check(!in_ready, "in_ready low during flush");
          in_valid = 1'($urandom_range(0, 1));  // must be ignored
          in_bit   = 1'($urandom_range(0, 1));
          in_last  = 0;
          m1 = 0;
        end else begin
          check(in_ready, "in_ready high outside flush");
          if (idle) begin
            in_valid = 0; in_bit = 1'($urandom_range(0, 1)); in_last = 0;
            i--;
            @(posedge clk);
            #1 check(!out_valid, "no output after idle cycle");
            continue;
          end
          in_valid = 1;
          in_bit   = 1'($urandom_range(0, 1));
          in_last  = (i == len - 1);
          m1 = in_bit;
        end
        exp_sym  = {m1 ^ r0 ^ r1, r0 ^ r1, m1 ^ r1};
        exp_last = (flush_left == 1);
        if (flush_left > 0) flush_left--;
        else if (in_last) flush_left = 2;
        r1 = r0; r0 = m1;
        @(posedge clk);
        #1;
        check(out_valid, "out_valid one cycle after accept");
        check(out_sym == exp_sym, $sformatf("code word exp %b got %b", exp_sym, out_sym));
        check(out_last == exp_last, "out_last");
      end
      check(r0 == 0 && r1 == 0, "reference back at zero state");
      check(dut.mem_q == '0, "encoder registers flushed to zero");
    end
    @(negedge clk); in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
