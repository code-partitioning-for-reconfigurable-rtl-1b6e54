// coef_loader: copies the convolution kernel from an OBM bank into registers.
//
// On a start pulse it reads COEF_WORDS consecutive words from linear OBM
// address `base`, one per cycle, and unpacks two coefficients per word
// (coefficient 2i in bits 31:0 of word i, 2i+1 in bits 63:32; the upper half
// of the last word is unused for 21 taps). `done` pulses in the cycle the
// last word is captured, i.e. COEF_WORDS + 1 cycles after start; the
// registers then hold the kernel until the next load. The copy from OBM to
// on-chip registers is a step of the case study's MAP code; the packing and
// timing are this design's own.
module coef_loader
  import map_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [LIN_AW-1:0]  base,
  output obm_req_t           req,
  input  logic [OBM_W-1:0]   rdata,
  output fp32_t              coef [TAPS],
  output logic               done
);

  localparam int unsigned CW = $clog2(COEF_WORDS + 1);

  logic          busy, cap;
  logic [CW-1:0] rd_idx, cap_idx;
  logic [LIN_AW-1:0] base_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cap     <= 1'b0;
      rd_idx  <= '0;
      cap_idx <= '0;
      base_q  <= '0;
      done    <= 1'b0;
      for (int q = 0; q < TAPS; q++) coef[q] <= '0;
    end else begin
      done <= 1'b0;
      cap  <= busy;
      cap_idx <= rd_idx;
      if (start && !busy) begin
        busy   <= 1'b1;
        rd_idx <= '0;
        base_q <= base;
      end else if (busy) begin
        if (rd_idx == CW'(COEF_WORDS - 1)) busy <= 1'b0;
        rd_idx <= rd_idx + 1'b1;
      end
      if (cap) begin
        for (int q = 0; q < TAPS; q++)
          if (q / 2 == int'(cap_idx)) coef[q] <= (q % 2 == 0) ? rdata[31:0] : rdata[63:32];
        if (cap_idx == CW'(COEF_WORDS - 1)) done <= 1'b1;
      end
    end
  end

  always_comb begin
    req       = '0;
    req.en    = busy;
    req.we    = 1'b0;
    req.addr  = base_q + LIN_AW'(rd_idx);
  end

endmodule
