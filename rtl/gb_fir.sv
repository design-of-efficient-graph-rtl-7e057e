// gb_fir: two-tap transposed-form FIR filter whose coefficient products come
// from one graph-based multiple constant multiplication block.
//
//   y[n] = 29 x[n] + 43 x[n-1]
//
// In the transposed form every coefficient multiplies the same input sample,
// so all products are formed at once by gb_mcm (x*29 and x*43, sharing 7x).
// The product for the later tap (43x) goes into the tap register; the
// output adds the earlier tap's product (29x) to what that register holds.
// The structural adder is an mcsa as well. Using an MCM block inside a
// transposed-form filter follows the document; the tap count, the
// coefficients (the document's example constants 29 and 43), the handshake
// and the reset are this design's choices.
//
// Timing: a sample is taken on a rising clk edge with in_valid high. y_out for
// that sample is valid from the same edge onward (one register stage,
// latency 1 cycle) and out_valid is high for one cycle. With in_valid low the
// filter holds its state. rst_n is synchronous and clears the tap register
// and the output. All words are two's complement; y_out is exact while
// |y| < 2^(N-1), i.e. for every DATA_W = 8 input with N = 16. The shared
// product p7 is used only inside gb_mcm, and the tap adder's two top sum bits
// and group carries are unused because the arithmetic is modulo 2^N.
module gb_fir
  import mcsa_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned N      = DEF_ADD_N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [N-1:0]      y_out
);

  localparam int unsigned NG = mcsa_num_groups(N, mcsa_first_w(N), mcsa_grp_w(N));

  logic signed [N-1:0] p7, p29, p43;

  gb_mcm #(.DATA_W(DATA_W), .N(N)) u_mcm (
    .x   (x_in),
    .p7  (p7),
    .p29 (p29),
    .p43 (p43)
  );

  // Tap register: 43 x[n-1] once sample n arrives.
  logic signed [N-1:0] z1;

  // Structural adder: 29 x[n] + z1.
  logic [N+1:0]  tap_sum;
  logic [NG-1:0] tap_gc;
  mcsa #(.N(N)) u_tap (
    .a         (p29),
    .b         (z1),
    .c         ('0),
    .sum       (tap_sum),
    .grp_carry (tap_gc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z1        <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z1    <= p43;
        y_out <= tap_sum[N-1:0];
      end
    end
  end

  // Handshake rule: an output appears exactly one cycle after each accepted
  // sample and at no other time.
  a_out_valid_follows_in_valid: assert property (
    @(posedge clk) disable iff (!rst_n) out_valid == $past(in_valid && rst_n)
  ) else $error("out_valid does not follow in_valid by one cycle");

endmodule
