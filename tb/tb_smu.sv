// tb_smu: self-checking test of the survivor memory shift register.
//
// Shifts random 4-bit decision vectors in, with random cycles where en is
// low, and checks after every cycle that stage k holds the vector shifted in
// k enabled cycles ago (a model queue kept here).
module tb_smu;
  logic clk = 1'b0, reset = 1'b1, en;
  logic [3:0] dec_in;
  logic [1:0][3:0] sm;
  int checks = 0, failures = 0;
  logic [3:0] hist [$];

  smu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; dec_in = 0;
    hist.push_front(4'h0); hist.push_front(4'h0);
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 3) != 0);
      dec_in = 4'($urandom);
      if (en) hist.push_front(dec_in);
      @(posedge clk);
      #1;
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (sm[k] != hist[k]) begin
          failures++;
          $display("FAIL stage %0d exp %h got %h", k, hist[k], sm[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
