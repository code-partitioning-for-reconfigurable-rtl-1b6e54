// conv_dot21_tb: streams random 21-pixel windows and kernels into the
// unrolled dot-product unit, one per cycle with occasional idle cycles, and
// checks each result bit for bit against a reference dot product computed in
// the same summation order, its tag, and that it arrives exactly 6 cycles
// after its inputs.
module conv_dot21_tb;
  import map_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT = 6;
  localparam int NVEC = 3000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, out_valid;
  logic [15:0] in_tag, out_tag;
  fp32_t       x [TAPS], h [TAPS], y;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  logic [31:0] exp_y [NVEC];
  int          t_in  [NVEC];
  int          n_out = 0;

  conv_dot21 #(.TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 3;
      if (y !== exp_y[out_tag]) begin
        failures++;
        if (failures < 10) $display("FAIL vec %0d: got %h expected %h", out_tag, y, exp_y[out_tag]);
      end
      if (int'(out_tag) != n_out) begin failures++; $display("FAIL order: tag %0d expected %0d", out_tag, n_out); end
      if (cycle - t_in[out_tag] != LAT) begin
        failures++; $display("FAIL latency %0d", cycle - t_in[out_tag]);
      end
      n_out++;
    end
  end

  initial begin
    logic [31:0] xv[], hv[];
    xv = new[TAPS]; hv = new[TAPS];
    in_valid = 0; in_tag = '0;
    foreach (x[i]) begin x[i] = '0; h[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      while ($urandom_range(3, 0) == 0) begin
        in_valid = 0; @(negedge clk);
      end
      for (int i = 0; i < TAPS; i++) begin
        xv[i] = rand_f(8);
        hv[i] = (v % 5 == 0 && i % 3 == 0) ? 32'h0 : rand_f(4);
        x[i] = xv[i]; h[i] = hv[i];
      end
      exp_y[v] = dot(xv, hv);
      in_valid = 1; in_tag = 16'(v);
      t_in[v] = cycle + 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_out != NVEC) begin failures++; $display("FAIL: %0d results of %0d", n_out, NVEC); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
