// tb_bmu: self-checking test of the branch metric unit.
//
// Drives random received symbols (and every symbol value at least once) and
// checks, one cycle later, that the metric of each of the 8 code words equals
// the number of differing bits, counted bit by bit here. Cycles with en low
// must leave the metrics unchanged.
module tb_bmu;
  logic clk = 1'b0, reset = 1'b1, en;
  logic [2:0] rx_sym;
  logic [7:0][2:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] last_sym;
    en = 0; rx_sym = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    last_sym = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en     = (t < 8) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      rx_sym = (t < 8) ? 3'(t) : 3'($urandom);
      if (en) last_sym = rx_sym;
      @(posedge clk);
      #1;
      for (int c = 0; c < 8; c++) begin
        int d;
        d = 0;
        for (int i = 0; i < 3; i++) if (last_sym[i] != c[i]) d++;
        checks++;
        if (int'(bm[c]) != d) begin
          failures++;
          $display("FAIL sym %b cw %0d exp %0d got %0d", last_sym, c, d, bm[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
