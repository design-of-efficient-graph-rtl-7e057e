// tb_gb_mcm: self-checking testbench of the graph-based 29x / 43x multiplier.
//
// Drives every 8-bit two's complement input and compares the three products
// (the shared 7x, 29x and 43x) with integer multiplication. It also counts
// how often the subtracting operation (7x = 8x - x) and each adder's
// carry-selected groups took their carry-in-1 path, and fails if any of
// those never happened. A 10-bit instance is checked on random inputs.
module tb_gb_mcm;
  import mcsa_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0]  x;
  logic signed [15:0] p7, p29, p43;
  gb_mcm dut (.x(x), .p7(p7), .p29(p29), .p43(p43));

  logic signed [9:0]  xw;
  logic signed [15:0] w7, w29, w43;
  gb_mcm #(.DATA_W(10), .N(16)) dut10 (.x(xw), .p7(w7), .p29(w29), .p43(w43));

  int cin1_7, cin1_29, cin1_43;

  // True when some carry-selected group of a 16-bit mcsa adding a, b and c
  // receives a carry-in of 1: the carry out of the low bits of the carry save
  // row's sum and shifted carry vectors.
  function automatic logic any_group_carry(logic [15:0] a, logic [15:0] b, logic [15:0] c);
    logic [16:0] p, q;
    logic any;
    p = {1'b0, a ^ b ^ c};
    q = {(a & b) | (a & c) | (b & c), 1'b0};
    any = 1'b0;
    for (int g = 0; g < int'(mcsa_num_groups(16, 5, 3)); g++) begin
      int unsigned lo;
      logic [17:0] t;
      lo = mcsa_grp_lo(5, 3, g);
      t = {1'b0, p & ((17'd1 << lo) - 17'd1)} + {1'b0, q & ((17'd1 << lo) - 17'd1)};
      any |= t[lo];
    end
    return any;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    cin1_7 = 0; cin1_29 = 0; cin1_43 = 0;
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      expect_eq("7x",  int'(p7),  int'(COEF_SHARED) * v);
      expect_eq("29x", int'(p29), int'(COEF_H0) * v);
      expect_eq("43x", int'(p43), int'(COEF_H1) * v);
      if (any_group_carry(16'(8 * v), ~16'(v), 16'd1)) cin1_7++;
      if (any_group_carry(16'(28 * v), 16'(v), 16'd0)) cin1_29++;
      if (any_group_carry(16'(29 * v), 16'(14 * v), 16'd0)) cin1_43++;
      if (v % 16 == 0) @(posedge clk);
    end
    for (int i = 0; i < 500; i++) begin
      int v;
      v = int'($urandom_range(1023)) - 512;
      xw = 10'(v);
      #1;
      expect_eq("7x (10 bit)",  int'(w7),  7 * v);
      expect_eq("29x (10 bit)", int'(w29), 29 * v);
      expect_eq("43x (10 bit)", int'(w43), 43 * v);
    end
    $display("carry-select on carry-in 1: op7 %0d, op29 %0d, op43 %0d inputs", cin1_7, cin1_29, cin1_43);
    checks++;
    if (cin1_7 == 0 || cin1_29 == 0 || cin1_43 == 0) begin
      failures++;
      $display("FAIL: an adder never used its carry-in-1 path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
