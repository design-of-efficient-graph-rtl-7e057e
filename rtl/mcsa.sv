// mcsa: modified carry save adder, a three-operand N-bit adder.
//
// a, b and c first pass through one row of N full adders (the carry save
// row), which reduces them to a sum vector and a carry vector without any
// carry propagation. A conventional carry save adder then adds these two
// vectors with a ripple-carry adder, whose carry chain sets its delay. Here
// that final stage is cut into groups over result bits [N:0]:
//   - the first FIRST_W bits ripple on their own (bit 0 is the carry save
//     row's sum bit 0 unchanged);
//   - every later group (mcsa_group) computes its slice for a carry-in of 0
//     and for a carry-in of 1 in parallel, and a multiplexer picks one as
//     soon as the carry from the group below arrives.
// The critical path is therefore the first group's ripple plus one
// multiplexer per later group. For N = 16 the groups are s[4:0] (carry c4),
// x[7:5] (c7), x[10:8] (c10), x[13:11] (c13) and x[17:14], the last carry
// being result bit 17. The grouping and the carry-0 precomputation follow the
// document; widths for other N come from the sizing rule in mcsa_pkg.
//
// Operands are unsigned; sum = a + b + c exactly, N+2 bits wide. Callers that
// work in two's complement take the low bits of sum. grp_carry[g] is the
// carry into carry-selected group g (c4, c7, c10, c13 for N = 16); it is
// brought out so the carry-select paths can be observed. Purely
// combinational.
module mcsa
  import mcsa_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned FIRST_W = mcsa_first_w(N),
  parameter int unsigned GRP_W   = mcsa_grp_w(N),
  localparam int unsigned NG     = mcsa_num_groups(N, FIRST_W, GRP_W)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [N-1:0]  c,
  output logic [N+1:0]  sum,
  output logic [NG-1:0] grp_carry
);

  // The first group must leave at least one bit for the carry-selected groups.
  if (FIRST_W < 1 || GRP_W < 1 || FIRST_W > N) begin : g_bad_size
    $error("mcsa: FIRST_W=%0d, GRP_W=%0d do not fit N=%0d", FIRST_W, GRP_W, N);
  end

  // Carry save row: one full adder per bit.
  logic [N-1:0] sv, cv;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      sv[i] = a[i] ^ b[i] ^ c[i];
      cv[i] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
    end
  end

  // Operands of the final stage, aligned over result bits [N:0].
  logic [N:0] p, q;
  assign p = {1'b0, sv};
  assign q = {cv, 1'b0};

  // First group: plain ripple with no carry-in.
  logic first_cout;
  mcsa_group #(.W(FIRST_W)) u_first (
    .p    (p[FIRST_W-1:0]),
    .q    (q[FIRST_W-1:0]),
    .cin  (1'b0),
    .s    (sum[FIRST_W-1:0]),
    .cout (first_cout)
  );

  // Carry-selected groups; carry[g] enters group g, carry[NG] leaves the last.
  logic [NG:0] carry;
  assign carry[0] = first_cout;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = mcsa_grp_lo(FIRST_W, GRP_W, g);
    localparam int unsigned GW = mcsa_grp_width(N, FIRST_W, GRP_W, g);
    mcsa_group #(.W(GW)) u_grp (
      .p    (p[LO +: GW]),
      .q    (q[LO +: GW]),
      .cin  (carry[g]),
      .s    (sum[LO +: GW]),
      .cout (carry[g+1])
    );
  end

  assign sum[N+1]  = carry[NG];
  assign grp_carry = carry[NG-1:0];

endmodule
