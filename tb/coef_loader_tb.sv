// coef_loader_tb: places two different kernels in an OBM model (banks F and
// E), loads each in turn and checks all 21 coefficients, that the loader
// reads exactly 11 consecutive words from the given base, and that `done`
// pulses once, 12 cycles after start.
module coef_loader_tb;
  import map_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             start, done;
  logic [LIN_AW-1:0] base;
  obm_req_t         req;
  logic [OBM_W-1:0] rdata;
  fp32_t            coef [TAPS];
  int               checks = 0, failures = 0, cycle = 0, n_rd = 0, n_done = 0;
  logic [63:0]      obm [int];

  coef_loader dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle++;
    if (req.en) begin
      n_rd++;
      if (req.we) begin failures++; $display("FAIL loader wrote OBM"); end
      rdata <= obm.exists(int'(req.addr)) ? obm[int'(req.addr)] : 64'hBAD0_BAD0_BAD0_BAD0;
    end
    if (done) n_done++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] h [TAPS];
    int t0;
    start = 0; base = '0; rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      base = (k == 1) ? bank_base(BANK_E) : bank_base(BANK_F) + LIN_AW'(k);
      for (int q = 0; q < TAPS; q++) h[q] = $urandom;
      for (int w = 0; w < COEF_WORDS; w++)
        obm[int'(base) + w] = {(2*w+1 < TAPS) ? h[2*w+1] : 32'hFFFF_FFFF, h[2*w]};
      n_rd = 0; n_done = 0;
      @(negedge clk) start = 1; t0 = cycle;
      @(negedge clk) start = 0;
      while (n_done == 0) @(negedge clk);
      checks++;
      // start is sampled at edge t0+1, done rises COEF_WORDS+1 edges later and
      // is counted at the edge after that.
      if (cycle - t0 != COEF_WORDS + 3) begin failures++; $display("FAIL done after %0d cycles", cycle - t0); end
      repeat (3) @(negedge clk);
      checks += 2;
      if (n_rd != COEF_WORDS) begin failures++; $display("FAIL %0d reads", n_rd); end
      if (n_done != 1) begin failures++; $display("FAIL %0d done pulses", n_done); end
      for (int q = 0; q < TAPS; q++) begin
        checks++;
        if (coef[q] !== h[q]) begin failures++; $display("FAIL coef %0d %h vs %h", q, coef[q], h[q]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
