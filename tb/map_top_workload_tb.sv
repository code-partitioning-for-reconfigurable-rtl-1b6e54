// map_top_workload_tb: the image sizes of the case study on the full design.
//
// Runs one MAP call each for a 1024x1024 image and for a 1772x1772 image (the
// largest square image whose 4-byte pixels fit the 12 MB of banks A-C), with
// a common memory that grants every request, and checks every output pixel
// against the reference separable convolution. It reports the cycles of each
// call and their equivalent at the 100 MHz FPGA clock, and checks that a
// 1774x1774 image, which does not fit, is rejected.
module map_top_workload_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  localparam int HAW = 22;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               start, busy, done, err, obm_conflict;
  logic [DIM_W-1:0]   m_rows, n_cols;
  logic [HOST_AW-1:0] hr_addr, hc_addr, img_in_addr, img_out_addr;
  host_req_t          host_req;
  logic               host_gnt, host_rvalid;
  logic [63:0]        host_rdata;
  int                 checks = 0, failures = 0;
  longint             cycle = 0;

  map_top dut (.*);
  host_mem_model #(.AW(HAW), .GNT_PCT(100)) u_mem (.clk, .req(host_req), .gnt(host_gnt),
                                                   .rvalid(host_rvalid), .rdata(host_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic call(int M, int N, output longint cycles);
    longint t0;
    @(negedge clk);
    m_rows = DIM_W'(M); n_cols = DIM_W'(N);
    start = 1; t0 = cycle;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    cycles = cycle - t0;
  endtask

  task automatic run(int S);
    logic [31:0] hr[], hc[], v[], o[];
    logic [31:0] r [][];
    int half, bad;
    longint cyc;
    half = S / 2;
    hr = new[TAPS]; hc = new[TAPS];
    // Damped-sinc-like kernels: sin(pi x)/(pi x) sampled at x = (q-10)/2,
    // damped by a Gaussian; exact values do not matter for the check.
    for (int q = 0; q < TAPS; q++) begin
      real x, s;
      x = (q - 10) / 2.0;
      s = (q == 10) ? 1.0 : $sin(3.14159265358979 * x) / (3.14159265358979 * x);
      hr[q] = r2f(s * $exp(-x * x / 20.0));
      hc[q] = hr[q];
    end
    for (int w = 0; w < COEF_WORDS; w++) begin
      u_mem.mem[int'(hr_addr) + w] = {(2*w+1 < TAPS) ? hr[2*w+1] : 32'h0, hr[2*w]};
      u_mem.mem[int'(hc_addr) + w] = {(2*w+1 < TAPS) ? hc[2*w+1] : 32'h0, hc[2*w]};
    end
    r = new[S];
    v = new[S];
    for (int m = 0; m < S; m++) begin
      for (int n = 0; n < S; n++) v[n] = rand_f(6);
      for (int k = 0; k < half; k++) u_mem.mem[int'(img_in_addr) + m * half + k] = {v[2*k+1], v[2*k]};
      conv1d(v, hr, r[m]);
    end
    call(S, S, cyc);
    $display("%0dx%0d image: %0d cycles = %0.4f s at 100 MHz", S, S, cyc, cyc / 1.0e8);
    checks++;
    if (err) begin failures++; $display("FAIL err"); end
    bad = 0;
    for (int n = 0; n < S; n++) begin
      for (int m = 0; m < S; m++) v[m] = r[m][n];
      conv1d(v, hc, o);
      for (int m = 0; m < S; m++) begin
        logic [63:0] w;
        w = u_mem.mem[int'(img_out_addr) + m * half + n / 2];
        checks++;
        if ((n % 2 ? w[63:32] : w[31:0]) !== o[m]) bad++;
      end
    end
    failures += bad;
    if (bad != 0) $display("FAIL %0dx%0d: %0d pixels differ", S, S, bad);
  endtask

  initial begin
    longint cyc;
    start = 0; m_rows = '0; n_cols = '0;
    hr_addr = 30'h10; hc_addr = 30'h20; img_in_addr = 30'h100; img_out_addr = 30'h20_0000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1024);
    run(1772);
    call(1774, 1774, cyc);
    checks++;
    if (!err) begin failures++; $display("FAIL 1774x1774 accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
