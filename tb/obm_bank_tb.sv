// obm_bank_tb: random reads and writes on a reduced-depth OBM bank against a
// reference array; checks one-cycle read latency and that rdata holds its
// value on idle and write cycles.
module obm_bank_tb;
  localparam int AW = 10;
  logic          clk = 1'b0, en, we;
  logic [AW-1:0] addr;
  logic [63:0]   wdata, rdata, exp_r;
  logic [63:0]   ref_m [2**AW];
  int            checks = 0, failures = 0;
  bit            pend;

  obm_bank #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 1; wdata = '0; addr = '0; pend = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      addr = AW'(i); wdata = {$urandom, $urandom}; ref_m[i] = wdata;
    end
    @(negedge clk) en = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== exp_r) begin failures++; if (failures < 10) $display("FAIL read %h vs %h", rdata, exp_r); end
      end
      en = ($urandom_range(3, 0) != 0);
      we = ($urandom_range(1, 0) == 0);
      addr = AW'($urandom);
      wdata = {$urandom, $urandom};
      if (en && !we) begin exp_r = ref_m[addr]; pend = 1; end
      else pend = pend;   // a held value must still equal the last read
      if (en && we) ref_m[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
