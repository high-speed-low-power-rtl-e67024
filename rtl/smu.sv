// smu: survivor memory unit.
//
// A serial-in serial-out shift register of decision vectors, one bit per
// trellis state. Its depth is M = K-1, the memory of the convolutional
// encoder, which is exactly the span the hybrid unit traces back through.
// Read horizontally, row s is the shift register holding the last M decisions
// of state s. sm[0] is the newest decision vector, sm[M-1] the oldest; every
// stage is visible so the hybrid unit can trace back in one cycle.
// The shift-register form and the link between its length and the encoder
// length follow the survivor memory description; the depth of exactly K-1
// is this design's reading of that link.
//
// Timing: with en high, dec_in is shifted in at the clock edge.
module smu #(
  parameter int S     = 4,
  parameter int DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     en,
  input  logic [S-1:0]             dec_in,
  output logic [DEPTH-1:0][S-1:0]  sm
);

  always_ff @(posedge clk) begin
    if (reset) begin
      sm <= '0;
    end else if (en) begin
      sm[0] <= dec_in;
      for (int k = 1; k < DEPTH; k++)
        sm[k] <= sm[k-1];
    end
  end

endmodule
