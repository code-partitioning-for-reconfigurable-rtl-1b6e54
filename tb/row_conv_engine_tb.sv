// row_conv_engine_tb: feeds several image rows through the per-row datapath,
// two pixels per word, each row followed by the 10 zero words that flush its
// tail, with random idle cycles in between. Every output word whose window
// lies inside the row is compared with a reference zero-extended 1D
// convolution; the tag and the 7-cycle latency are checked too.
module row_conv_engine_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT  = 7;
  localparam int ROWS = 6;

  logic        clk = 1'b0, rst_n = 1'b0;
  fp32_t       coef [TAPS];
  logic        in_valid, out_valid;
  logic [63:0] in_word, out_word;
  logic [31:0] in_tag, out_tag;   // {row, pair index k}
  int          checks = 0, failures = 0, cycle = 0, n_words = 0;
  int          lens [ROWS] = '{2, 22, 40, 64, 8, 100};
  logic [31:0] ref_o [ROWS][];
  int          t_in [int];

  row_conv_engine #(.TAG_W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int r, k, p;
    r = int'(out_tag[31:16]);
    k = int'(out_tag[15:0]);
    p = 2 * k - (TAPS - 1);
    n_words++;
    checks++;
    if (cycle - t_in[int'(out_tag)] != LAT) begin
      failures++; $display("FAIL latency %0d", cycle - t_in[int'(out_tag)]);
    end
    if (p >= 0 && p < lens[r]) begin
      checks += 2;
      if (out_word[31:0] !== ref_o[r][p]) begin
        failures++; $display("FAIL row %0d p %0d: %h vs %h", r, p, out_word[31:0], ref_o[r][p]);
      end
      if (out_word[63:32] !== ref_o[r][p+1]) begin
        failures++; $display("FAIL row %0d p %0d: %h vs %h", r, p+1, out_word[63:32], ref_o[r][p+1]);
      end
    end
  end

  initial begin
    logic [31:0] h[], img[];
    int total = 0;
    h = new[TAPS];
    for (int q = 0; q < TAPS; q++) begin h[q] = rand_f(3); coef[q] = h[q]; end
    in_valid = 0; in_word = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      img = new[lens[r]];
      foreach (img[i]) img[i] = rand_f(10);
      conv1d(img, h, ref_o[r]);
      for (int k = 0; k < lens[r] / 2 + (TAPS - 1) / 2; k++) begin
        @(negedge clk);
        while ($urandom_range(4, 0) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_word  = (k < lens[r] / 2) ? {img[2*k+1], img[2*k]} : 64'h0;
        in_tag   = {16'(r), 16'(k)};
        t_in[int'(in_tag)] = cycle + 1;
        total++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_words != total) begin failures++; $display("FAIL %0d words out of %0d", n_words, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
