// secondary_fpga_tb: checks the slave chip on its own. An OBM model holds the
// column kernel in bank E and a random row-pass image in banks D-F. The test
// pulses `load`, waits for coef_ok, holds the chip waiting for a while, then
// pulses `go` and waits for `done`. It checks every pixel written to A-C
// against a reference column convolution, that nothing is written before
// `go`, and that the column pass takes N/2 * (M + 20) cycles plus the
// pipeline drain. Sizes include an image taller than the 21-tap kernel and
// one shorter than it.
module secondary_fpga_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             load, coef_ok, go, busy, done;
  logic [DIM_W-1:0] m_rows, n_cols;
  obm_req_t         req [2];
  logic [OBM_W-1:0] rdq [2];
  int               checks = 0, failures = 0, cycle = 0;

  secondary_fpga dut (
    .clk, .rst_n, .load, .coef_ok, .go, .m_rows, .n_cols, .busy, .done,
    .rd_req(req[0]), .rd_data(rdq[0]), .wr_req(req[1]));
  obm_model #(.NP(2)) u_obm (.clk, .req, .rdata(rdq));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int M, int N);
    logic [31:0] h[], col[], o[];
    logic [31:0] img [][];
    int t0, wr0, half;
    half = N / 2;
    h = new[TAPS];
    for (int q = 0; q < TAPS; q++) h[q] = rand_f(3);
    for (int w = 0; w < COEF_WORDS; w++)
      u_obm.store[int'(bank_base(BANK_E)) + w] = {(2*w+1 < TAPS) ? h[2*w+1] : 32'h0, h[2*w]};
    img = new[M];
    foreach (img[m]) begin
      img[m] = new[N];
      foreach (img[m][n]) img[m][n] = rand_f(10);
      for (int k = 0; k < half; k++)
        u_obm.store[int'(bank_base(BANK_D)) + m * half + k] = {img[m][2*k+1], img[m][2*k]};
    end
    m_rows = DIM_W'(M); n_cols = DIM_W'(N);
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    while (!coef_ok) @(negedge clk);
    wr0 = u_obm.n_wr;
    repeat (25) @(negedge clk);
    checks++;
    if (u_obm.n_wr != wr0 || busy) begin failures++; $display("FAIL slave worked before go"); end
    go = 1; t0 = cycle;
    @(negedge clk) go = 0;
    while (!done) @(negedge clk);
    checks++;
    // go sampled at edge t0+1; N/2*(M+20) issue cycles, then a 10-cycle drain.
    if (cycle - t0 != half * (M + TAPS - 1) + 11) begin
      failures++; $display("FAIL column pass took %0d cycles", cycle - t0);
    end
    checks++;
    if (u_obm.n_wr - wr0 != M * half) begin failures++; $display("FAIL %0d words written", u_obm.n_wr - wr0); end
    col = new[M];
    for (int n = 0; n < N; n++) begin
      for (int m = 0; m < M; m++) col[m] = img[m][n];
      conv1d(col, h, o);
      for (int m = 0; m < M; m++) begin
        logic [63:0] w;
        w = u_obm.store[m * half + n / 2];
        checks++;
        if ((n % 2 ? w[63:32] : w[31:0]) !== o[m]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): %h vs %h", m, n, n % 2 ? w[63:32] : w[31:0], o[m]);
        end
      end
    end
    u_obm.store.delete();
  endtask

  initial begin
    load = 0; go = 0; m_rows = '0; n_cols = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(30, 8);
    run(7, 6);
    run(1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
