// col_conv_engine_tb: feeds several column pairs through the per-column
// datapath, one word (one pixel of each of two columns) per cycle, each pair
// followed by 20 zero words, with random idle cycles. Each output word whose
// window starts inside the column is compared, lane by lane, with a
// reference zero-extended 1D convolution of that column; tags and the
// 7-cycle latency are checked as well.
module col_conv_engine_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT   = 7;
  localparam int PAIRS = 5;

  logic        clk = 1'b0, rst_n = 1'b0;
  fp32_t       coef [TAPS];
  logic        in_valid, out_valid;
  logic [63:0] in_word, out_word;
  logic [31:0] in_tag, out_tag;   // {pair, step s}
  int          checks = 0, failures = 0, cycle = 0, n_words = 0;
  int          lens [PAIRS] = '{1, 21, 37, 64, 5};
  logic [31:0] ref0 [PAIRS][], ref1 [PAIRS][];
  int          t_in [int];

  col_conv_engine #(.TAG_W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int c, s, m;
    c = int'(out_tag[31:16]);
    s = int'(out_tag[15:0]);
    m = s - (TAPS - 1);
    n_words++;
    checks++;
    if (cycle - t_in[int'(out_tag)] != LAT) begin
      failures++; $display("FAIL latency %0d", cycle - t_in[int'(out_tag)]);
    end
    if (m >= 0 && m < lens[c]) begin
      checks += 2;
      if (out_word[31:0] !== ref0[c][m] || out_word[63:32] !== ref1[c][m]) begin
        failures++;
        $display("FAIL pair %0d m %0d: %h vs %h_%h", c, m, out_word, ref1[c][m], ref0[c][m]);
      end
    end
  end

  initial begin
    logic [31:0] h[], c0[], c1[];
    int total = 0;
    h = new[TAPS];
    for (int q = 0; q < TAPS; q++) begin h[q] = rand_f(3); coef[q] = h[q]; end
    in_valid = 0; in_word = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < PAIRS; c++) begin
      c0 = new[lens[c]]; c1 = new[lens[c]];
      foreach (c0[i]) begin c0[i] = rand_f(10); c1[i] = rand_f(10); end
      conv1d(c0, h, ref0[c]);
      conv1d(c1, h, ref1[c]);
      for (int s = 0; s < lens[c] + TAPS - 1; s++) begin
        @(negedge clk);
        while ($urandom_range(4, 0) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_word  = (s < lens[c]) ? {c1[s], c0[s]} : 64'h0;
        in_tag   = {16'(c), 16'(s)};
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
