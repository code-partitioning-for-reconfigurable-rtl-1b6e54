// row_conv_engine: per-row convolution datapath of the primary FPGA.
//
// Each cycle a 64-bit OBM word brings in the next two pixels of a row. They
// enter the top of a (TAPS+1)-pixel shift window, which moves down by two.
// Two conv_dot21 units then evaluate two neighbouring outputs at once:
//   out0 = sum_q win[q]   * h[q]      (output index p)
//   out1 = sum_q win[q+1] * h[q]      (output index p+1)
// After the word holding pixels 2k and 2k+1 has entered, win[0] is pixel
// 2k-TAPS+1, so the pair of outputs p = 2k-(TAPS-1), p+1 is produced; for
// TAPS = 21 the first full pair needs k >= 10. Feeding zero words after the
// last pixels of a row gives the zero-extended tail of 1DCONVOLUTION.
// The shift-by-two window and the two parallel units follow the case study;
// the packing (out0 in bits 31:0) and the tag are this design's choices.
// Timing: in_word/in_tag sampled with in_valid; out_word/out_tag/out_valid
// follow LATENCY = 7 cycles later. One word in and one word out per cycle.
module row_conv_engine
  import map_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fp32_t            coef [TAPS],
  input  logic             in_valid,
  input  logic [63:0]      in_word,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [63:0]      out_word,
  output logic [TAG_W-1:0] out_tag
);

  fp32_t            win [TAPS+1];
  fp32_t            x0 [TAPS], x1 [TAPS];
  logic             win_valid;
  logic [TAG_W-1:0] win_tag;
  logic             v1;
  logic [TAG_W-1:0] t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= TAPS; i++) win[i] <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < TAPS - 1; i++) win[i] <= win[i+2];
        win[TAPS-1] <= in_word[31:0];
        win[TAPS]   <= in_word[63:32];
      end
    end
  end

  always_ff @(posedge clk) if (in_valid) win_tag <= in_tag;

  always_comb
    for (int q = 0; q < TAPS; q++) begin
      x0[q] = win[q];
      x1[q] = win[q+1];
    end

  conv_dot21 #(.TAG_W(TAG_W)) u_dot0 (
    .clk, .rst_n, .in_valid(win_valid), .in_tag(win_tag), .x(x0), .h(coef),
    .out_valid, .out_tag, .y(out_word[31:0]));

  conv_dot21 #(.TAG_W(TAG_W)) u_dot1 (
    .clk, .rst_n, .in_valid(win_valid), .in_tag(win_tag), .x(x1), .h(coef),
    .out_valid(v1), .out_tag(t1), .y(out_word[63:32]));

  // Both units run in lock step; their valid/tag copies must agree.
  assert property (@(posedge clk) disable iff (!rst_n)
                   v1 == out_valid && (!v1 || t1 == out_tag));

endmodule
