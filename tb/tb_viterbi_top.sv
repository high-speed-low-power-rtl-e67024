// tb_viterbi_top: end-to-end test of the encoder and decoder together, at the
// default parameters (K = 3, rate 1/3, REG_LEN = 16).
//
// Random frames of random length go into the encoder with random idle cycles;
// each frame ends with enc_in_last, so the encoder appends its two flush code
// words. Every encoder code word passes a channel that now and then flips one
// bit (never two within 8 code words) and goes straight into the decoder with
// clk_enable = enc_out_valid, so the decoder stalls whenever the encoder is
// idle. A final all-zero frame pushes the last bits out of the decoder.
//
// Checks: every decoded bit equals the bit that produced the code word
// (message or flush zero), in order, with the fixed latency of REG_LEN + 3
// enabled cycles. Mechanisms counted, each of which must occur: flush
// termination, clock-enable stalls, corrected channel errors, the hybrid
// unit's trace and store phases (once per K-1 stages each), and an output
// taken from a best state other than state 0.
module tb_viterbi_top;
  localparam int L = 16, LAT = L + 3, NFRAMES = 60;
  logic clk = 1'b0, reset = 1'b1;
  logic enc_in_valid, enc_in_bit, enc_in_last, enc_in_ready, enc_out_valid, enc_out_last;
  logic [2:0] enc_out_sym;
  logic clk_enable;
  logic [2:0] in1;
  logic ce_out, out1;
  int checks = 0, failures = 0;

  viterbi_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Bits that produced each code word, in order (message bits and flush zeros).
  logic sent [$];
  int n_flush = 0, n_stall = 0, n_flip = 0, n_trace = 0, n_store = 0, n_best_nz = 0;
  int n_sym = 0, n_out = 0, since_flip = 100;
  bit tail_phase = 0;

  // Transmit side model of what the encoder consumes: record the bit behind
  // every code word (a flush word carries a zero).
  always @(posedge clk) if (!reset) begin
    if (enc_in_ready && enc_in_valid) sent.push_back(enc_in_bit);
    else if (!enc_in_ready) sent.push_back(1'b0);
    if (enc_out_last) n_flush++;
  end

  // Channel and receive-side feed (combinational from the encoder output).
  logic [2:0] flip_mask;
  always_comb begin
    clk_enable = enc_out_valid;
    in1 = enc_out_sym ^ flip_mask;
  end
  always @(negedge clk) begin
    flip_mask = '0;
    if (enc_out_valid && !tail_phase && since_flip >= 8 && $urandom_range(0, 4) == 0) begin
      flip_mask[$urandom_range(0, 2)] = 1'b1;
    end
  end

  // Receive-side checking.
  always @(posedge clk) if (!reset) begin
    if (!clk_enable) n_stall++;
    if (clk_enable) begin
      if (flip_mask != 0) begin n_flip++; since_flip = 0; end else since_flip++;
      check(ce_out == (n_sym >= LAT), "ce_out after REG_LEN+3 enabled cycles");
      if (ce_out) begin
        check(out1 == sent[n_out], $sformatf("decoded bit %0d exp %b got %b", n_out, sent[n_out], out1));
        n_out++;
      end
      n_sym++;
    end
    if (dut.u_decoder.u_hybrid.trace_phase) begin
      n_trace++;
      if (dut.u_decoder.best_state != 0) n_best_nz++;
    end
    if (dut.u_decoder.u_hybrid.store_phase) n_store++;
  end

  task automatic send_frame(input int len, input bit zeros);
    int i;
    i = 0;
    while (i < len) begin
      @(negedge clk);
      if (!enc_in_ready) begin enc_in_valid = 1'($urandom_range(0, 1)); continue; end
      if (!zeros && $urandom_range(0, 3) == 0) begin enc_in_valid = 0; continue; end
      enc_in_valid = 1;
      enc_in_bit   = zeros ? 1'b0 : 1'($urandom);
      enc_in_last  = (i == len - 1);
      i++;
    end
    @(negedge clk);
    enc_in_valid = 0; enc_in_last = 0;
  endtask

  initial begin
    enc_in_valid = 0; enc_in_bit = 0; enc_in_last = 0; flip_mask = '0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int f = 0; f < NFRAMES; f++) send_frame(1 + int'($urandom_range(0, 80)), 1'b0);
    tail_phase = 1;
    send_frame(LAT + 4, 1'b1);
    repeat (10) @(posedge clk);
    $display("symbols %0d decoded %0d flushes %0d stalls %0d channel errors %0d trace %0d store %0d best!=0 %0d",
             n_sym, n_out, n_flush, n_stall, n_flip, n_trace, n_store, n_best_nz);
    check(n_out == n_sym - LAT, "every symbol decoded except the last REG_LEN+3");
    check(n_flush == NFRAMES + 1, "flush termination after every frame");
    check(n_stall > 0, "decoder stalled by clock enable");
    check(n_flip > 0, "channel errors injected and corrected");
    check(n_trace > 0 && n_store > 0, "hybrid trace and store phases");
    check(n_trace >= (n_sym - 1) / 2 - 1 && n_trace <= (n_sym - 1) / 2, "one trace phase per K-1 stages");
    check(n_best_nz > 0, "output taken from a best state other than 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
