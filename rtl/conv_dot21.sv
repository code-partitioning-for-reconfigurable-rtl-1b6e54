// conv_dot21: one fully unrolled single-precision convolution output.
//
// Computes y = sum_{q=0}^{TAPS-1} x[q] * h[q] with TAPS multipliers working
// side by side and a balanced tree of TAPS-1 adders, so a new set of TAPS
// pixels can enter every clock cycle. With TAPS = 21 this is the 21 products
// and 20 sums of one kernel application; the full datapath uses two of these.
// The tree adds neighbours pairwise, (0,1), (2,3), ..., at each level and
// carries an odd element up unchanged through a register, so every path has
// the same depth. That summation order fixes the rounding of the result.
// Timing: x, h and in_tag sampled with in_valid at a clock edge; y, out_tag
// and out_valid appear LATENCY = 1 + clog2(TAPS) cycles later (6 for 21 taps).
// in_tag is carried along unchanged so the caller can tag each result with,
// for example, its destination address. Valid flags reset to 0.
module conv_dot21
  import map_pkg::*;
#(
  parameter int unsigned N_TAPS = TAPS,
  parameter int unsigned TAG_W  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fp32_t            x [N_TAPS],
  input  fp32_t            h [N_TAPS],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fp32_t            y
);

  localparam int unsigned LEVELS  = $clog2(N_TAPS);
  localparam int unsigned LATENCY = 1 + LEVELS;

  // Number of values left at a tree level.
  function automatic int unsigned level_count(int unsigned lvl);
    int unsigned c = N_TAPS;
    for (int unsigned i = 0; i < lvl; i++) c = (c + 1) / 2;
    return c;
  endfunction

  // tree[0] holds the products; tree[l+1] the sums of level l.
  fp32_t tree [LEVELS+1][N_TAPS];

  for (genvar q = 0; q < N_TAPS; q++) begin : g_mul
    fp32_mul u_mul (.clk(clk), .a(x[q]), .b(h[q]), .y(tree[0][q]));
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar j = 0; j < level_count(l + 1); j++) begin : g_node
      if (2 * j + 1 < level_count(l)) begin : g_add
        fp32_add u_add (.clk(clk), .a(tree[l][2*j]), .b(tree[l][2*j+1]), .y(tree[l+1][j]));
      end else begin : g_carry
        always_ff @(posedge clk) tree[l+1][j] <= tree[l][2*j];
      end
    end
  end

  assign y = tree[LEVELS][0];

  logic [LATENCY-1:0] vpipe;
  logic [TAG_W-1:0]   tpipe [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tpipe[0] <= in_tag;
    for (int unsigned i = 1; i < LATENCY; i++) tpipe[i] <= tpipe[i-1];
  end

  assign out_valid = vpipe[LATENCY-1];
  assign out_tag   = tpipe[LATENCY-1];

endmodule
