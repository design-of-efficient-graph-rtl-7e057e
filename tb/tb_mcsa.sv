// tb_mcsa: self-checking testbench of the modified carry save adder.
//
// Checks the default 16-bit adder, and 32- and 64-bit adders sized by the
// same grouping rule, against a + b + c computed by plain integer
// arithmetic. The carries into the carry-selected groups (c4, c7, c10, c13
// for 16 bits) are checked against the carry out of the low bits of the
// carry save row's sum and carry vectors, and the test requires every group
// multiplexer to have picked both its carry-0 and its carry-1 input.
// Stimulus: corner values (all ones, long carry chains) then random words.
module tb_mcsa;
  import mcsa_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned N16 = 16;
  localparam int unsigned N32 = 32;
  localparam int unsigned N64 = 64;
  localparam int unsigned NG16 = mcsa_num_groups(N16, mcsa_first_w(N16), mcsa_grp_w(N16));
  localparam int unsigned NG32 = mcsa_num_groups(N32, mcsa_first_w(N32), mcsa_grp_w(N32));
  localparam int unsigned NG64 = mcsa_num_groups(N64, mcsa_first_w(N64), mcsa_grp_w(N64));

  logic [N16-1:0] a16, b16, c16;
  logic [N16+1:0] s16;
  logic [NG16-1:0] gc16;
  logic [N32-1:0] a32, b32, c32;
  logic [N32+1:0] s32;
  logic [NG32-1:0] gc32;
  logic [N64-1:0] a64, b64, c64;
  logic [N64+1:0] s64;
  logic [NG64-1:0] gc64;

  mcsa dut16 (.a(a16), .b(b16), .c(c16), .sum(s16), .grp_carry(gc16));
  mcsa #(.N(N32)) dut32 (.a(a32), .b(b32), .c(c32), .sum(s32), .grp_carry(gc32));
  mcsa #(.N(N64)) dut64 (.a(a64), .b(b64), .c(c64), .sum(s64), .grp_carry(gc64));

  // How often each 16-bit group multiplexer selected carry-in 0 and 1.
  int sel0 [NG16];
  int sel1 [NG16];

  // Reference carry into bit lo of the final stage of an n-bit adder.
  function automatic logic ref_carry(logic [63:0] a, logic [63:0] b, logic [63:0] c,
                                     int unsigned lo);
    logic [65:0] p, q, mask;
    p = {2'b00, a ^ b ^ c};
    q = {2'b00, (a & b) | (a & c) | (b & c)} << 1;
    mask = (66'd1 << lo) - 66'd1;
    return 1'(((p & mask) + (q & mask)) >> lo);
  endfunction

  task automatic check16();
    logic [N16+1:0] exp;
    #1;
    exp = (N16+2)'(a16) + (N16+2)'(b16) + (N16+2)'(c16);
    checks++;
    if (s16 !== exp) begin
      failures++;
      $display("FAIL 16: %h+%h+%h = %h, expected %h", a16, b16, c16, s16, exp);
    end
    for (int g = 0; g < int'(NG16); g++) begin
      logic rc;
      rc = ref_carry(64'(a16), 64'(b16), 64'(c16), mcsa_grp_lo(mcsa_first_w(N16), mcsa_grp_w(N16), g));
      checks++;
      if (gc16[g] !== rc) begin
        failures++;
        $display("FAIL 16: group %0d carry %b expected %b", g, gc16[g], rc);
      end
      if (gc16[g]) sel1[g]++; else sel0[g]++;
    end
  endtask

  task automatic check32();
    logic [N32+1:0] exp;
    #1;
    exp = (N32+2)'(a32) + (N32+2)'(b32) + (N32+2)'(c32);
    checks++;
    if (s32 !== exp) begin
      failures++;
      $display("FAIL 32: %h+%h+%h = %h, expected %h", a32, b32, c32, s32, exp);
    end
  endtask

  task automatic check64();
    logic [N64+1:0] exp;
    #1;
    exp = (N64+2)'(a64) + (N64+2)'(b64) + (N64+2)'(c64);
    checks++;
    if (s64 !== exp) begin
      failures++;
      $display("FAIL 64: %h+%h+%h = %h, expected %h", a64, b64, c64, s64, exp);
    end
  endtask

  initial begin
    for (int g = 0; g < int'(NG16); g++) begin
      sel0[g] = 0;
      sel1[g] = 0;
    end
    // Group layout of the 16-bit adder: s[4:0], then x[7:5] ... x[17:14].
    checks++;
    if (mcsa_first_w(N16) != 5 || mcsa_grp_w(N16) != 3 || NG16 != 4) begin
      failures++;
      $display("FAIL: 16-bit grouping %0d/%0d/%0d", mcsa_first_w(N16), mcsa_grp_w(N16), NG16);
    end

    // Corner cases.
    a16 = '1; b16 = '1; c16 = '1; check16();
    a16 = '0; b16 = '0; c16 = '0; check16();
    a16 = '1; b16 = 16'd1; c16 = '0; check16();
    a16 = 16'h7fff; b16 = 16'h0001; c16 = '0; check16();
    a16 = 16'h001f; b16 = 16'h0001; c16 = '0; check16();
    a16 = 16'h00ff; b16 = 16'h0001; c16 = 16'h0000; check16();
    a16 = 16'h5555; b16 = 16'haaaa; c16 = 16'h0001; check16();

    for (int i = 0; i < 3000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 16'($urandom);
      if (i % 3 == 1) c16 = '0;
      check16();
      a32 = $urandom; b32 = $urandom; c32 = $urandom;
      check32();
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; c64 = {$urandom, $urandom};
      check64();
      if (i % 100 == 0) @(posedge clk);
    end
    a32 = '1; b32 = '1; c32 = '1; check32();
    a32 = '1; b32 = 32'd1; c32 = '0; check32();
    a64 = '1; b64 = '1; c64 = '1; check64();
    a64 = '1; b64 = 64'd1; c64 = '0; check64();

    // Every group multiplexer must have taken both inputs.
    for (int g = 0; g < int'(NG16); g++) begin
      $display("group %0d: carry-in 0 selected %0d times, carry-in 1 %0d times", g, sel0[g], sel1[g]);
      checks++;
      if (sel0[g] == 0 || sel1[g] == 0) begin
        failures++;
        $display("FAIL: group %0d multiplexer not exercised both ways", g);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
