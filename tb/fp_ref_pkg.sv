// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Works through the simulator's double-precision reals, independently of the
// RTL: an fp32 value is widened exactly to a double, the operation is done in
// double, and the result is rounded back to fp32 (nearest, ties to even) by
// bit manipulation. For one multiply or one add this double rounding gives the
// correctly rounded fp32 result. Subnormals are treated as zero on input and
// flushed to zero on output, matching the datapath's convention.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) e = e + 1;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // Random normal fp32 with exponent in [127-span, 127+span].
  function automatic logic [31:0] rand_f(int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(2 * span, 0)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // Reference for one 21-tap dot product, using the same adder-tree order as
  // the datapath: pairwise (0,1),(2,3),... per level, odd element carried up.
  function automatic logic [31:0] dot(logic [31:0] x[], logic [31:0] h[]);
    logic [31:0] v[$];
    logic [31:0] nv[$];
    for (int i = 0; i < x.size(); i++) v.push_back(fmul(x[i], h[i]));
    while (v.size() > 1) begin
      nv = {};
      for (int i = 0; i + 1 < v.size(); i += 2) nv.push_back(fadd(v[i], v[i+1]));
      if (v.size() % 2 == 1) nv.push_back(v[v.size()-1]);
      v = nv;
    end
    return v[0];
  endfunction

  // Reference 1DCONVOLUTION: o[p] = sum_q i[p+q] * h[q], with i read as zero
  // past its end, each output summed in the datapath's tree order.
  function automatic void conv1d(input logic [31:0] i[], input logic [31:0] h[],
                                 output logic [31:0] o[]);
    logic [31:0] x[];
    o = new[i.size()];
    x = new[h.size()];
    for (int p = 0; p < i.size(); p++) begin
      for (int q = 0; q < h.size(); q++) x[q] = (p + q < i.size()) ? i[p+q] : 32'h0;
      o[p] = dot(x, h);
    end
  endfunction

endpackage
