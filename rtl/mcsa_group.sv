// mcsa_group: one group of the final stage of the modified carry save adder.
//
// The group adds two W-bit slices p and q. It first ripples them with a
// carry-in of 0 (a chain of full adders, the first one degenerating to a
// half adder). The result for a carry-in of 1 is that sum plus one, which
// an incrementer forms from the carry-0 sum alone: bit i flips when every
// lower bit of the carry-0 sum is 1. Both results exist before the group's
// carry-in arrives, so when cin settles a 2:1 multiplexer only has to pick
// one, and the carry does not ripple through the group. The carry-0
// computation and the multiplexer follow the document; the incrementer that
// supplies the carry-1 result is this design's choice of how to form it.
//
// Purely combinational: s/cout follow p, q and cin after one multiplexer
// delay once the internal sums have settled.
module mcsa_group #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] q,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] s0, s1;  // sums for a carry-in of 0 and of 1
  logic         c0, c1;  // carries out for a carry-in of 0 and of 1

  // Ripple-carry sum assuming the carry-in is 0.
  always_comb begin
    logic c;
    c = 1'b0;
    for (int i = 0; i < W; i++) begin
      s0[i] = p[i] ^ q[i] ^ c;
      c     = (p[i] & q[i]) | (c & (p[i] ^ q[i]));
    end
    c0 = c;
  end

  // Add one to {c0, s0}: a bit toggles when all bits below it are 1.
  always_comb begin
    logic all_ones;
    all_ones = 1'b1;
    for (int i = 0; i < W; i++) begin
      s1[i]    = s0[i] ^ all_ones;
      all_ones = all_ones & s0[i];
    end
    c1 = c0 | all_ones;
  end

  // Carry-select multiplexer.
  assign s    = cin ? s1 : s0;
  assign cout = cin ? c1 : c0;

endmodule
