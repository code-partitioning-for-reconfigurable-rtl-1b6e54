// fp32_add: IEEE-754 single-precision adder, one pipeline register.
//
// Stands in for the single-precision add macro of the convolution datapath;
// its insides are this design's own. It aligns the smaller operand to the
// larger one keeping guard, round and sticky bits, adds or subtracts the
// 24-bit significands, renormalises and rounds to nearest, ties to even.
// Subnormal inputs read as zero and subnormal results flush to zero; x + (-x)
// gives +0; overflow gives infinity; inf - inf and NaN inputs give a quiet NaN.
// Interface: a, b sampled at a rising clock edge, y valid one cycle later
// (latency 1, one result per cycle). No reset: the register only carries data.
module fp32_add
  import map_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t y_d;

  always_comb begin
    fp32_t       bg, lit;     // larger and smaller magnitude operand
    logic [7:0]  eb, es, d;
    logic [26:0] mb, ms;        // 1.fraction followed by guard, round, sticky
    logic [53:0] ext;
    logic [27:0] sum;
    logic signed [10:0] e;
    logic [4:0]  lz;
    logic        lsb, g, r, st, up;
    logic [24:0] rnd;
    logic        a_zero, b_zero, a_spec, b_spec;

    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_spec = (a[30:23] == 8'hFF);
    b_spec = (b[30:23] == 8'hFF);

    // Order by magnitude (exponent and fraction compare as one integer).
    if (a[30:0] >= b[30:0]) begin bg = a; lit = b; end
    else                    begin bg = b; lit = a; end
    eb = bg[30:23];
    es = lit[30:23];
    d  = eb - es;

    mb  = {1'b1, bg[22:0], 3'b000};
    ext = {1'b1, lit[22:0], 3'b000, 27'd0} >> d;
    if (d > 8'd26) ms = 27'd1;   // far smaller operand only sets sticky
    else           ms = {ext[53:28], ext[27] | (|ext[26:0])};

    e  = $signed({3'b0, eb});
    lz = '0;
    if (bg[31] == lit[31]) begin
      sum = {1'b0, mb} + {1'b0, ms};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 11'sd1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms};
      // Leading-zero count of the 27-bit difference (bit 26 is the hidden one).
      for (int i = 0; i <= 26; i++)
        if (sum[i]) lz = 5'(26 - i);
      sum = sum << lz;
      e   = e - $signed({6'b0, lz});
    end

    lsb = sum[3];
    g   = sum[2];
    r   = sum[1];
    st  = sum[0];
    up  = g && (r || st || lsb);
    rnd = {1'b0, sum[26:3]} + 25'(up);
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 11'sd1;
    end

    if ((a_spec && a[22:0] != '0) || (b_spec && b[22:0] != '0) ||
        (a_spec && b_spec && (a[31] != b[31])))
      y_d = 32'h7FC0_0000;
    else if (a_spec)
      y_d = a;
    else if (b_spec)
      y_d = b;
    else if (a_zero && b_zero)
      y_d = {a[31] & b[31], 31'd0};
    else if (a_zero)
      y_d = b;
    else if (b_zero)
      y_d = a;
    else if (bg[31] != lit[31] && bg[30:0] == lit[30:0])
      y_d = 32'd0;
    else if (e >= 11'sd255)
      y_d = {bg[31], 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y_d = {bg[31], 31'd0};
    else
      y_d = {bg[31], e[7:0], rnd[22:0]};
  end

  always_ff @(posedge clk) y <= y_d;

endmodule
