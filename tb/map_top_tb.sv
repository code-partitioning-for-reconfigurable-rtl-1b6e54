// map_top_tb: end-to-end test of the MAP processor with all parameters at
// their defaults (full-size OBM banks). The host side is a common-memory
// model with random grant and read latency. For several image sizes the test
// writes random kernels and a random image into common memory, makes one MAP
// call and compares every output pixel with a reference separable
// convolution (rows with Hr, then columns with Hc, zero beyond the edges,
// each sum in the datapath's order). It also checks the duration of the row
// and column passes and counts the design's mechanisms, each of which must
// occur: DMA in and out, kernel copies on both chips, the kernel hand-shake,
// the slave waiting for the master and the master waiting for the slave,
// zero flush words in both passes, common-memory back-pressure, and the
// rejection of an invalid size.
module map_top_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  localparam int HAW = 16;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               start, busy, done, err, obm_conflict;
  logic [DIM_W-1:0]   m_rows, n_cols;
  logic [HOST_AW-1:0] hr_addr, hc_addr, img_in_addr, img_out_addr;
  host_req_t          host_req;
  logic               host_gnt, host_rvalid;
  logic [63:0]        host_rdata;
  int                 checks = 0, failures = 0;

  // mechanism counters
  int n_dma_in = 0, n_dma_out = 0, n_coef_pri = 0, n_coef_sec = 0, n_handshake = 0;
  int n_sec_wait = 0, n_pri_wait = 0, n_row_flush = 0, n_col_flush = 0;
  int n_backpressure = 0, n_rejected = 0;
  int row_cyc = 0, col_cyc = 0;

  map_top dut (.*);
  host_mem_model #(.AW(HAW)) u_mem (.clk, .req(host_req), .gnt(host_gnt),
                                    .rvalid(host_rvalid), .rdata(host_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_dma.done) begin
      if (dut.u_dma.c.to_host) n_dma_out++; else n_dma_in++;
    end
    if (dut.u_primary.cl_done) n_coef_pri++;
    if (dut.u_secondary.cl_done) n_coef_sec++;
    if (dut.sec_coef_ok) n_handshake++;
    if (dut.u_secondary.coef_ok === 1'b0 && dut.u_secondary.st == 3'd2) n_sec_wait++;
    if (dut.u_secondary.busy) n_pri_wait++;
    if (dut.u_primary.s1_valid) begin
      row_cyc++;
      if (dut.u_primary.s1_zero) n_row_flush++;
    end
    if (dut.u_secondary.s1_valid) begin
      col_cyc++;
      if (dut.u_secondary.s1_zero) n_col_flush++;
    end
    if (host_req.req && !host_gnt) n_backpressure++;
    if (obm_conflict) begin failures++; $display("FAIL OBM bank conflict"); end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic call(int M, int N);
    @(negedge clk);
    m_rows = DIM_W'(M); n_cols = DIM_W'(N);
    start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic run(int M, int N);
    logic [31:0] hr[], hc[], v[], o[];
    logic [31:0] img [][], r [][];
    int half, rc0, cc0;
    half = N / 2;
    hr = new[TAPS]; hc = new[TAPS];
    for (int q = 0; q < TAPS; q++) begin hr[q] = rand_f(3); hc[q] = rand_f(3); end
    for (int w = 0; w < COEF_WORDS; w++) begin
      u_mem.mem[int'(hr_addr) + w] = {(2*w+1 < TAPS) ? hr[2*w+1] : 32'h0, hr[2*w]};
      u_mem.mem[int'(hc_addr) + w] = {(2*w+1 < TAPS) ? hc[2*w+1] : 32'h0, hc[2*w]};
    end
    img = new[M]; r = new[M];
    foreach (img[m]) begin
      img[m] = new[N];
      foreach (img[m][n]) img[m][n] = rand_f(10);
      for (int k = 0; k < half; k++) u_mem.mem[int'(img_in_addr) + m * half + k] = {img[m][2*k+1], img[m][2*k]};
      conv1d(img[m], hr, r[m]);
    end
    rc0 = row_cyc; cc0 = col_cyc;
    call(M, N);
    checks += 3;
    if (err) begin failures++; $display("FAIL err for %0dx%0d", M, N); end
    if (row_cyc - rc0 != M * (half + (TAPS - 1) / 2)) begin
      failures++; $display("FAIL row pass %0d cycles", row_cyc - rc0);
    end
    if (col_cyc - cc0 != half * (M + TAPS - 1)) begin
      failures++; $display("FAIL column pass %0d cycles", col_cyc - cc0);
    end
    v = new[M];
    for (int n = 0; n < N; n++) begin
      for (int m = 0; m < M; m++) v[m] = r[m][n];
      conv1d(v, hc, o);
      for (int m = 0; m < M; m++) begin
        logic [63:0] w;
        w = u_mem.mem[int'(img_out_addr) + m * half + n / 2];
        checks++;
        if ((n % 2 ? w[63:32] : w[31:0]) !== o[m]) begin
          failures++;
          if (failures < 10) $display("FAIL %0dx%0d (%0d,%0d): %h vs %h", M, N, m, n,
                                      n % 2 ? w[63:32] : w[31:0], o[m]);
        end
      end
    end
  endtask

  initial begin
    start = 0; m_rows = '0; n_cols = '0;
    hr_addr = 30'h10; hc_addr = 30'h20; img_in_addr = 30'h100; img_out_addr = 30'h8000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(24, 12);
    run(3, 50);
    call(5, 9);                       // odd width: rejected
    checks++;
    if (err) n_rejected++; else begin failures++; $display("FAIL odd width accepted"); end
    run(1, 2);
    run(40, 64);
    $display("mechanisms: dma_in=%0d dma_out=%0d coef_pri=%0d coef_sec=%0d handshake=%0d",
             n_dma_in, n_dma_out, n_coef_pri, n_coef_sec, n_handshake);
    $display("            slave_wait=%0d master_wait=%0d row_flush=%0d col_flush=%0d backpressure=%0d rejected=%0d",
             n_sec_wait, n_pri_wait, n_row_flush, n_col_flush, n_backpressure, n_rejected);
    checks += 11;
    if (n_dma_in != 12)   begin failures++; $display("FAIL DMA in count"); end
    if (n_dma_out != 4)   begin failures++; $display("FAIL DMA out count"); end
    if (n_coef_pri != 4)  begin failures++; $display("FAIL primary kernel copies"); end
    if (n_coef_sec != 4)  begin failures++; $display("FAIL secondary kernel copies"); end
    if (n_handshake != 4) begin failures++; $display("FAIL kernel hand-shakes"); end
    if (n_sec_wait == 0)  begin failures++; $display("FAIL slave never waited"); end
    if (n_pri_wait == 0)  begin failures++; $display("FAIL master never waited"); end
    if (n_row_flush == 0) begin failures++; $display("FAIL no row flush"); end
    if (n_col_flush == 0) begin failures++; $display("FAIL no column flush"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (n_rejected != 1)  begin failures++; $display("FAIL rejection count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
