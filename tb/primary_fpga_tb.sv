// primary_fpga_tb: checks the master chip on its own. The testbench plays
// the DMA engine (copies between a host array and an OBM model after a
// delay), the secondary chip (reports its kernel loaded only late, and on
// `go` copies banks D-F back into A-C unchanged) and the host. It checks the
// four DMA commands of a call (Hc->E, Hr->F, image->A-C, A-C->host) and their
// order, that the row pass waits for the secondary's kernel, every pixel of
// the row pass in D-F against a reference row convolution, the row-pass
// duration M*(N/2+10) cycles plus a 10-cycle drain, the returned image, and
// that an odd image width is rejected with `err` and no DMA.
module primary_fpga_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               start, busy, done, err;
  logic [DIM_W-1:0]   m_rows, n_cols, m_q, n_q;
  logic [HOST_AW-1:0] hr_addr, hc_addr, img_in_addr, img_out_addr;
  logic               dma_cmd_valid, dma_busy, dma_done;
  dma_cmd_t           dma_cmd;
  obm_req_t           req [2];
  logic [OBM_W-1:0]   rdq [2];
  logic               sec_load, sec_coef_ok, sec_go, sec_done;
  int                 checks = 0, failures = 0, cycle = 0;

  logic [63:0] host [int];
  dma_cmd_t    cmds [$];
  int          first_rd = -1, go_cycle = -1, coef_ok_cycle = -1, first_wr = -1;

  primary_fpga dut (
    .clk, .rst_n, .start, .m_rows, .n_cols, .hr_addr, .hc_addr, .img_in_addr,
    .img_out_addr, .busy, .done, .err, .m_q, .n_q, .dma_cmd_valid, .dma_cmd,
    .dma_busy, .dma_done, .rd_req(req[0]), .rd_data(rdq[0]), .wr_req(req[1]),
    .sec_load, .sec_coef_ok, .sec_go, .sec_done);
  obm_model #(.NP(2)) u_obm (.clk, .req, .rdata(rdq));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (req[0].en && req[0].addr < bank_base(BANK_D) && first_rd < 0) first_rd = cycle;
    if (rst_n && req[1].en && first_wr < 0) first_wr = cycle;
    if (sec_go) go_cycle = cycle;
  end

  // DMA engine stand-in.
  initial begin
    dma_busy = 0; dma_done = 0;
    forever begin
      @(posedge clk);
      if (dma_cmd_valid && !dma_busy) begin
        dma_cmd_t c;
        c = dma_cmd;
        cmds.push_back(c);
        #1 dma_busy = 1;
        repeat (int'(c.len) / 8 + 5) @(posedge clk);
        for (int i = 0; i < int'(c.len); i++)
          if (c.to_host) host[int'(c.host_addr) + i] = u_obm.store[int'(c.obm_addr) + i];
          else u_obm.store[int'(c.obm_addr) + i] = host[int'(c.host_addr) + i];
        #1 dma_busy = 0; dma_done = 1;
        @(posedge clk) #1 dma_done = 0;
      end
    end
  end

  // Secondary chip stand-in.
  initial begin
    sec_coef_ok = 0; sec_done = 0;
    forever begin
      @(posedge clk);
      if (sec_load) begin
        repeat (400) @(posedge clk);
        #1 sec_coef_ok = 1; coef_ok_cycle = cycle;
        @(posedge clk) #1 sec_coef_ok = 0;
      end
      if (sec_go) begin
        repeat (20) @(posedge clk);
        for (int w = 0; w < 3 * (1 << BANK_AW); w++)
          if (u_obm.store.exists(int'(bank_base(BANK_D)) + w))
            u_obm.store[w] = u_obm.store[int'(bank_base(BANK_D)) + w];
        #1 sec_done = 1;
        @(posedge clk) #1 sec_done = 0;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
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

  initial begin
    logic [31:0] hr[], hc[], row[], o[];
    logic [31:0] img [][];
    int M, N, half;
    M = 9; N = 40; half = N / 2;
    start = 0; m_rows = '0; n_cols = '0;
    hr_addr = 30'h100; hc_addr = 30'h200; img_in_addr = 30'h1000; img_out_addr = 30'h8000;
    hr = new[TAPS]; hc = new[TAPS];
    for (int q = 0; q < TAPS; q++) begin hr[q] = rand_f(3); hc[q] = rand_f(3); end
    for (int w = 0; w < COEF_WORDS; w++) begin
      host[int'(hr_addr) + w] = {(2*w+1 < TAPS) ? hr[2*w+1] : 32'h0, hr[2*w]};
      host[int'(hc_addr) + w] = {(2*w+1 < TAPS) ? hc[2*w+1] : 32'h0, hc[2*w]};
    end
    img = new[M];
    foreach (img[m]) begin
      img[m] = new[N];
      foreach (img[m][n]) img[m][n] = rand_f(10);
      for (int k = 0; k < half; k++) host[int'(img_in_addr) + m * half + k] = {img[m][2*k+1], img[m][2*k]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    call(M, N);
    checks += 3;
    if (err) begin failures++; $display("FAIL err on a valid size"); end
    if (cmds.size() != 4) begin failures++; $display("FAIL %0d DMA commands", cmds.size()); end
    else begin
      checks += 4;
      if (cmds[0].to_host || cmds[0].host_addr != hc_addr || cmds[0].obm_addr != bank_base(BANK_E) || cmds[0].len != COEF_WORDS)
        begin failures++; $display("FAIL DMA 0 %p", cmds[0]); end
      if (cmds[1].to_host || cmds[1].host_addr != hr_addr || cmds[1].obm_addr != bank_base(BANK_F) || cmds[1].len != COEF_WORDS)
        begin failures++; $display("FAIL DMA 1 %p", cmds[1]); end
      if (cmds[2].to_host || cmds[2].host_addr != img_in_addr || cmds[2].obm_addr != 0 || int'(cmds[2].len) != M * half)
        begin failures++; $display("FAIL DMA 2 %p", cmds[2]); end
      if (!cmds[3].to_host || cmds[3].host_addr != img_out_addr || cmds[3].obm_addr != 0 || int'(cmds[3].len) != M * half)
        begin failures++; $display("FAIL DMA 3 %p", cmds[3]); end
    end
    if (first_rd <= coef_ok_cycle || first_wr <= coef_ok_cycle) begin
      failures++; $display("FAIL row pass started before the secondary had its kernel %0d %0d %0d", first_rd, first_wr, coef_ok_cycle);
    end
    checks++;
    if (go_cycle - first_rd != M * (half + (TAPS - 1) / 2) + 10) begin
      failures++; $display("FAIL row pass took %0d cycles", go_cycle - first_rd);
    end
    // The stand-in secondary copied the row pass back, so the host gets it.
    for (int m = 0; m < M; m++) begin
      conv1d(img[m], hr, o);
      for (int n = 0; n < N; n++) begin
        logic [63:0] w;
        w = host[int'(img_out_addr) + m * half + n / 2];
        checks++;
        if ((n % 2 ? w[63:32] : w[31:0]) !== o[n]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): %h vs %h", m, n, n % 2 ? w[63:32] : w[31:0], o[n]);
        end
      end
    end

    // Odd width: rejected at once.
    cmds = {};
    call(4, 7);
    checks += 2;
    if (!err) begin failures++; $display("FAIL odd width accepted"); end
    repeat (5) @(negedge clk);
    if (cmds.size() != 0) begin failures++; $display("FAIL DMA on a rejected call"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
