// col_conv_engine: per-column convolution datapath of the secondary FPGA.
//
// A 64-bit OBM word read from image row m holds the pixels of two
// neighbouring columns n (bits 31:0) and n+1 (bits 63:32). The engine keeps a
// TAPS-pixel shift window for each of the two columns; every valid word moves
// both windows by one pixel, and two conv_dot21 units compute one output of
// each column per cycle. After pixel s of a column has entered, win[0] is
// pixel s-(TAPS-1), so column output m = s-(TAPS-1) is produced; zero words
// after the last row give the zero-extended tail. The two results are packed
// back into one word for the same two columns, so outputs are written with
// the same layout the pixels were read in.
// Processing two adjacent columns side by side is this design's way of using
// the two convolution units of a chip on columns; the case study states only
// that the secondary chip does the per-column calculations.
// Timing: in_word/in_tag sampled with in_valid; results LATENCY = 7 cycles
// later. One word in and one word out per cycle.
module col_conv_engine
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

  fp32_t            win0 [TAPS], win1 [TAPS];
  logic             win_valid;
  logic [TAG_W-1:0] win_tag;
  logic             v1;
  logic [TAG_W-1:0] t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) begin
        win0[i] <= '0;
        win1[i] <= '0;
      end
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < TAPS - 1; i++) begin
          win0[i] <= win0[i+1];
          win1[i] <= win1[i+1];
        end
        win0[TAPS-1] <= in_word[31:0];
        win1[TAPS-1] <= in_word[63:32];
      end
    end
  end

  always_ff @(posedge clk) if (in_valid) win_tag <= in_tag;

  conv_dot21 #(.TAG_W(TAG_W)) u_dot0 (
    .clk, .rst_n, .in_valid(win_valid), .in_tag(win_tag), .x(win0), .h(coef),
    .out_valid, .out_tag, .y(out_word[31:0]));

  conv_dot21 #(.TAG_W(TAG_W)) u_dot1 (
    .clk, .rst_n, .in_valid(win_valid), .in_tag(win_tag), .x(win1), .h(coef),
    .out_valid(v1), .out_tag(t1), .y(out_word[63:32]));

  assert property (@(posedge clk) disable iff (!rst_n)
                   v1 == out_valid && (!v1 || t1 == out_tag));

endmodule
