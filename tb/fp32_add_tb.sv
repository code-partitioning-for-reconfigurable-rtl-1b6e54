// fp32_add_tb: self-checking test of the single-precision add unit.
// Applies directed corner cases (zeros, cancellation, infinities, rounding
// ties, overflow, underflow) and random operands over a wide exponent range,
// and compares every result bit for bit, one cycle after the operands, with
// a reference computed in double precision and rounded to fp32.
module fp32_add_tb;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  fp32_add dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] z, logic [31:0] exp_y);
    @(negedge clk);
    a = x; b = z;
    @(posedge clk); #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h add %h: got %h expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] x, z;
    a = '0; b = '0;
    // Directed cases; the expected values are written out by hand.
    check(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000);   // 1 + 2 = 3
    check(32'h4040_0000, 32'hC040_0000, 32'h0000_0000);   // 3 - 3 = +0
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);   // -0 + -0 = -0
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);   // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);   // tie rounds up to even
    check(32'h3F80_0000, 32'hB380_0000, 32'h3F7F_FFFF);   // 1 - 2^-24 exact
    check(32'h4B7F_FFFF, 32'h3F80_0000, 32'h4B80_0000);   // carry renormalises
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf = NaN
    check(32'h0100_0000, 32'h8080_0000, 32'h0080_0000);   // 2^-125 - 2^-126
    check(32'h0080_0001, 32'h8080_0000, 32'h0000_0000);   // result subnormal: flushed
    check(32'h4120_0000, 32'h0000_0000, 32'h4120_0000);   // 10 + 0
    // Random operands against the double-precision reference.
    for (int i = 0; i < 20000; i++) begin
      x = rand_f((i % 4 == 0) ? 60 : 12);
      z = rand_f((i % 4 == 0) ? 60 : 12);
      if (i % 7 == 0) z = {~x[31], x[30:23], z[22:0]};  // heavy cancellation
      if (i % 11 == 0) z = {~x[31], x[30:0] ^ 31'(1 << (i % 5))};
      check(x, z, fadd(x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
