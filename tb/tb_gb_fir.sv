// tb_gb_fir: end-to-end self-checking testbench of the two-tap
// transposed-form FIR filter y[n] = 29 x[n] + 43 x[n-1], at its default
// parameters.
//
// A reference model keeps the previous accepted sample and predicts every
// output. The test checks the one-cycle latency (out_valid exactly one cycle
// after each accepted sample, never otherwise), that idle cycles
// (in_valid low) leave the filter state unchanged, that reset clears the tap
// register, and the output value for every 8-bit input value plus random
// streams. It counts how often each mechanism occurred (the 7x subtraction
// with a borrow into the upper groups, a carry-in of 1 at the structural
// adder's carry-selected groups, idle cycles, a mid-stream reset) and fails
// if any never did.
module tb_gb_fir;
  import mcsa_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic              rst_n;
  logic              in_valid;
  logic signed [7:0] x_in;
  logic              out_valid;
  logic signed [15:0] y_out;

  gb_fir dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x_in      (x_in),
    .out_valid (out_valid),
    .y_out     (y_out)
  );

  // Reference state.
  int  prev_x;       // x[n-1] as the model sees it
  int  exp_y;        // expected y for the sample accepted last cycle
  bit  exp_valid;    // a sample was accepted last cycle
  initial rst_n = 1'b0;

  int  n_samples, n_idle, n_reset, n_tap_cin1, n_sub_borrow;

  // Carry into any carry-selected group of a 16-bit mcsa adding a + b.
  function automatic logic any_group_carry(logic [15:0] a, logic [15:0] b);
    logic [16:0] p, q;
    logic any;
    p = {1'b0, a ^ b};
    q = {a & b, 1'b0};
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

  // Output check, sampled just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL: out_valid=%b expected %b at %0t", out_valid, exp_valid, $time);
      end
      if (exp_valid) begin
        checks++;
        if (int'(y_out) != exp_y) begin
          failures++;
          $display("FAIL: y=%0d expected %0d at %0t", y_out, exp_y, $time);
        end
      end
    end
  end

  // Apply one sample (or an idle cycle) for one clock.
  // Inputs change on the falling edge, away from the sampling edge.
  task automatic drive(bit valid, int v);
    @(negedge clk);
    in_valid = valid;
    x_in     = 8'(v);
    if (valid) begin
      if (any_group_carry(16'(COEF_H0 * v), 16'(int'(COEF_H1) * prev_x))) n_tap_cin1++;
      if (any_group_carry(16'(8 * v), ~16'(v))) n_sub_borrow++;
      n_samples++;
    end else begin
      n_idle++;
    end
    @(posedge clk);
    exp_valid = valid;
    if (valid) begin
      exp_y  = int'(COEF_H0) * v + int'(COEF_H1) * prev_x;
      prev_x = v;
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    prev_x = 0;
    exp_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    n_samples = 0; n_idle = 0; n_reset = 0; n_tap_cin1 = 0; n_sub_borrow = 0;
    prev_x = 0; exp_y = 0; exp_valid = 1'b0;
    x_in = '0;
    do_reset();
    // Every input value, back to back, then in reverse with idle gaps.
    for (int v = -128; v < 128; v++) drive(1'b1, v);
    for (int v = 127; v >= -128; v--) begin
      drive(1'b1, v);
      if (v % 5 == 0) drive(1'b0, 0);
    end
    // Reset in mid-stream: the tap register must start again from zero.
    drive(1'b1, 77);
    do_reset();
    n_reset++;
    drive(1'b1, -100);
    drive(1'b1, 100);
    // Random stream with random idle cycles.
    for (int i = 0; i < 4000; i++) begin
      drive(($urandom_range(3) != 0), int'($urandom_range(255)) - 128);
    end
    drive(1'b0, 0);
    drive(1'b0, 0);

    $display("samples %0d, idle cycles %0d, resets in stream %0d", n_samples, n_idle, n_reset);
    $display("tap adder carry-in-1 selections %0d, 7x subtraction carry-in-1 selections %0d",
             n_tap_cin1, n_sub_borrow);
    checks++;
    if (n_idle == 0 || n_reset == 0 || n_tap_cin1 == 0 || n_sub_borrow == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
