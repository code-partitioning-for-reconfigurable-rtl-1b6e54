// obm_interconnect_tb: five masters issue random reads and writes, each cycle
// to distinct banks (a random assignment of banks to ports, some idle). Bank
// models behind the interconnect store writes and answer reads a cycle later.
// Checks that every write lands in the right bank and offset, that each read
// returns to its own port the word of the bank it addressed, and that no
// conflict is flagged.
module obm_interconnect_tb;
  import map_pkg::*;
  localparam int NP = 5;

  logic               clk = 1'b0, rst_n = 1'b0;
  obm_req_t           req   [NP];
  logic [OBM_W-1:0]   rdata [NP];
  logic               conflict;
  logic               bank_en    [NUM_BANKS];
  logic               bank_we    [NUM_BANKS];
  logic [BANK_AW-1:0] bank_addr  [NUM_BANKS];
  logic [OBM_W-1:0]   bank_wdata [NUM_BANKS];
  logic [OBM_W-1:0]   bank_rdata [NUM_BANKS];
  int                 checks = 0, failures = 0;

  logic [63:0] store [int];          // key: linear address
  logic [63:0] exp_rd [NP];
  bit          pend [NP], pend_q [NP];
  logic [63:0] exp_q [NP];

  obm_interconnect #(.NPORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk)
    for (int b = 0; b < NUM_BANKS; b++)
      if (bank_en[b]) begin
        int key;
        key = b * (1 << BANK_AW) + int'(bank_addr[b]);
        if (bank_we[b]) store[key] = bank_wdata[b];
        else bank_rdata[b] <= store.exists(key) ? store[key] : 64'h0;
      end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] mirror [int];
    int perm [NUM_BANKS];
    foreach (req[p]) begin req[p] = '0; pend[p] = 0; pend_q[p] = 0; end
    foreach (bank_rdata[b]) bank_rdata[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (conflict) begin failures++; $display("FAIL conflict flagged"); end
      foreach (perm[b]) perm[b] = b;
      perm.shuffle();
      for (int p = 0; p < NP; p++) begin
        int key;
        req[p].en    = ($urandom_range(4, 0) != 0);
        req[p].we    = ($urandom_range(1, 0) == 0);
        req[p].addr  = LIN_AW'(perm[p] * (1 << BANK_AW) + $urandom_range(63, 0) * 977);
        req[p].wdata = {$urandom, $urandom};
        key = int'(req[p].addr);
        pend[p] = req[p].en && !req[p].we;
        if (pend[p]) exp_rd[p] = mirror.exists(key) ? mirror[key] : 64'h0;
        if (req[p].en && req[p].we) mirror[key] = req[p].wdata;
      end
      // Last cycle's reads are answered while the new requests are applied.
      #1;
      for (int p = 0; p < NP; p++) if (pend_q[p]) begin
        checks++;
        if (rdata[p] !== exp_q[p]) begin
          failures++; if (failures < 10) $display("FAIL port %0d read %h vs %h", p, rdata[p], exp_q[p]);
        end
      end
      pend_q = pend;
      exp_q  = exp_rd;
    end
    @(negedge clk);
    foreach (req[p]) req[p].en = 0;
    @(negedge clk);
    foreach (mirror[k]) begin
      checks++;
      if (!store.exists(k) || store[k] !== mirror[k]) begin failures++; $display("FAIL stored word %h", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
