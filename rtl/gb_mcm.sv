// gb_mcm: multiple constant multiplication of x by 29 and 43, built as the
// graph-based shift-add network that shares the partial product 7x.
//
// Writing each constant in binary (29 = 11101b, 43 = 101011b) needs six
// additions. The graph-based network needs three operations, because the
// partial product 7x serves both outputs:
//   op1:  7x = (x << 3) - x
//   op2: 29x = (7x << 2) + x
//   op3: 43x = 29x + (7x << 1)
// Every operation is one mcsa (modified carry save adder). A subtraction
// uses the adder's third operand for the +1 of the two's complement:
// (x << 3) - x = (x << 3) + ~x + 1. Additions tie the third operand to 0.
// The use of 7x, and of an mcsa for every operation, follows the document;
// the exact edges of the graph, the signed operands and the word widths are
// this design's choices.
//
// Interface: x is a DATA_W-bit two's complement sample. Each product is an
// N-bit two's complement word (the mcsa sum modulo 2^N, exact while the
// product fits: |43x| < 2^(N-1)). Purely combinational, three adders deep on
// the path to p43. The adders' two top sum bits and their group carries are
// left unconnected on purpose: the arithmetic is modulo 2^N.
module gb_mcm
  import mcsa_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned N      = DEF_ADD_N
) (
  input  logic signed [DATA_W-1:0] x,
  output logic signed [N-1:0]      p7,
  output logic signed [N-1:0]      p29,
  output logic signed [N-1:0]      p43
);

  localparam int unsigned NG = mcsa_num_groups(N, mcsa_first_w(N), mcsa_grp_w(N));

  logic [N-1:0] xs;  // x sign-extended to the adder width
  assign xs = N'(x);

  logic [N+1:0]  sum7, sum29, sum43;
  logic [NG-1:0] gc7, gc29, gc43;

  // op1: 7x = 8x + ~x + 1
  mcsa #(.N(N)) u_op7 (
    .a         (xs << 3),
    .b         (~xs),
    .c         (N'(1)),
    .sum       (sum7),
    .grp_carry (gc7)
  );
  assign p7 = sum7[N-1:0];

  // op2: 29x = 4 * 7x + x
  mcsa #(.N(N)) u_op29 (
    .a         (p7 << 2),
    .b         (xs),
    .c         ('0),
    .sum       (sum29),
    .grp_carry (gc29)
  );
  assign p29 = sum29[N-1:0];

  // op3: 43x = 29x + 2 * 7x
  mcsa #(.N(N)) u_op43 (
    .a         (p29),
    .b         (p7 << 1),
    .c         ('0),
    .sum       (sum43),
    .grp_carry (gc43)
  );
  assign p43 = sum43[N-1:0];

endmodule
