// dma_engine_tb: runs DMA commands of random length in both directions
// between a common-memory model (random grant, variable read latency) and an
// OBM model with one-cycle reads, then checks every word that arrived, that
// nothing outside the target range was written, that `done` pulses once per
// command, and that a transfer with an always-granting memory keeps about one
// word per cycle.
module dma_engine_tb;
  import map_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmd_valid, busy, done;
  dma_cmd_t    cmd;
  obm_req_t    obm_req;
  logic [63:0] obm_rdata;
  host_req_t   host_req;
  logic        host_gnt, host_rvalid;
  logic [63:0] host_rdata;
  int          checks = 0, failures = 0, n_done = 0;

  logic [63:0] obm [int];

  dma_engine dut (.*);
  host_mem_model #(.AW(14)) u_mem (.clk, .req(host_req), .gnt(host_gnt),
                                   .rvalid(host_rvalid), .rdata(host_rdata));

  always #5 clk = ~clk;

  // OBM model: writes land at once, reads return next cycle.
  always @(posedge clk) begin
    if (obm_req.en && obm_req.we) obm[int'(obm_req.addr)] = obm_req.wdata;
    if (obm_req.en && !obm_req.we)
      obm_rdata <= obm.exists(int'(obm_req.addr)) ? obm[int'(obm_req.addr)] : 64'hDEAD;
    if (done) n_done++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit to_host, int haddr, int oaddr, int len, output int cycles);
    int n_before;
    n_before = n_done;
    @(negedge clk);
    cmd = '0;
    cmd.to_host = to_host; cmd.host_addr = HOST_AW'(haddr);
    cmd.obm_addr = LIN_AW'(oaddr); cmd.len = LIN_AW'(len);
    cmd_valid = 1;
    @(negedge clk) cmd_valid = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    repeat (2) @(negedge clk);
    checks++;
    if (n_done != n_before + 1) begin failures++; $display("FAIL done pulses %0d", n_done - n_before); end
  endtask

  initial begin
    int cyc, len, ha, oa;
    cmd_valid = 0; cmd = '0; obm_rdata = '0;
    for (int i = 0; i < 2**14; i++) u_mem.mem[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      len = (t == 0) ? 1 : $urandom_range(300, 2);
      ha  = $urandom_range(4000, 0);
      oa  = (t % 3) * (1 << BANK_AW) + $urandom_range(1000, 0);
      // host -> OBM
      obm.delete();
      run(0, ha, oa, len, cyc);
      checks++;
      if (obm.num() != len) begin failures++; $display("FAIL %0d OBM words written, expected %0d", obm.num(), len); end
      for (int i = 0; i < len; i++) begin
        checks++;
        if (!obm.exists(oa + i) || obm[oa + i] !== u_mem.mem[ha + i]) begin
          failures++; if (failures < 10) $display("FAIL in word %0d", i);
        end
      end
      // OBM -> host, to a fresh region
      for (int i = 0; i < len; i++) obm[oa + i] = {$urandom, $urandom};
      for (int i = 0; i < len + 2; i++) u_mem.mem[8192 + i] = 64'h0;
      run(1, 8192 + 1, oa, len, cyc);
      for (int i = 0; i < len; i++) begin
        checks++;
        if (u_mem.mem[8192 + 1 + i] !== obm[oa + i]) begin
          failures++; if (failures < 10) $display("FAIL out word %0d", i);
        end
      end
      checks += 2;
      if (u_mem.mem[8192] !== 64'h0 || u_mem.mem[8192 + len + 1] !== 64'h0) begin
        failures++; $display("FAIL write outside range");
      end
    end
    // Streaming rate with a memory that always grants.
    u_mem.GNT_FORCE = 1;
    run(1, 0, 0, 200, cyc);
    checks++;
    if (cyc > 200 + 8) begin failures++; $display("FAIL OBM->host 200 words took %0d cycles", cyc); end
    run(0, 0, 0, 200, cyc);
    checks++;
    if (cyc > 200 + 12) begin failures++; $display("FAIL host->OBM 200 words took %0d cycles", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
