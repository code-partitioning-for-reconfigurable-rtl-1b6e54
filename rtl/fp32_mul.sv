// fp32_mul: IEEE-754 single-precision multiplier, one pipeline register.
//
// Stands in for the reduced-area single-precision multiply macro the
// convolution datapath is built from; the macro's insides are not part of
// this design, so this is a plain implementation of its function:
//   * round to nearest, ties to even;
//   * subnormal inputs are read as zero and subnormal results are flushed
//     to zero (signed), as FPGA floating-point cores commonly do;
//   * overflow gives infinity; inf * 0 and NaN inputs give a quiet NaN.
// Interface: a, b sampled at a rising clock edge, y valid one cycle later
// (latency 1, one result per cycle). No reset: the register only carries data.
module fp32_mul
  import map_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t y_d;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] prod;
    logic [22:0] frac;
    logic        guard, sticky;
    logic signed [10:0] e;
    logic [23:0] rnd;
    logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

    s      = a[31] ^ b[31];
    ea     = a[30:23];
    eb     = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);

    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    if (prod[47]) begin
      frac   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e      = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 11'sd126;
    end else begin
      frac   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
      e      = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 11'sd127;
    end
    // Round to nearest even; a carry out of the fraction bumps the exponent.
    rnd = {1'b0, frac} + 24'(guard && (sticky || frac[0]));
    if (rnd[23]) e = e + 11'sd1;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y_d = 32'h7FC0_0000;
    else if (a_inf || b_inf)
      y_d = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y_d = {s, 31'd0};
    else if (e >= 11'sd255)
      y_d = {s, 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y_d = {s, 31'd0};
    else
      y_d = {s, e[7:0], rnd[22:0]};
  end

  always_ff @(posedge clk) y <= y_d;

endmodule
