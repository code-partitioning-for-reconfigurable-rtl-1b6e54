// secondary_fpga: the secondary user FPGA of the MAP processor (slave chip).
//
// It does the per-column half of the separable convolution:
//   1. on `load` (the column kernel Hc has arrived in bank E) it copies Hc
//      into on-chip registers and raises coef_ok for one cycle;
//   2. it then waits for `go`, which the primary chip gives only after the
//      whole row pass has been written to banks D-F;
//   3. column pass: columns are taken in adjacent pairs (n, n+1), which share
//      the 64-bit words of the row-pass image. For each pair it reads the M
//      words of that pair down the image (stride N/2 words) from D-F, then
//      feeds 20 zero words, and writes each result word for rows 0..M-1 to the
//      same offset in A-C. A pair takes M + 20 cycles, the pass N/2 pairs;
//   4. it pulses `done` once the last result is written.
// The master/slave order (copy kernel from E, wait for the primary, columns
// from D-F into A-C) follows the case study; the pairing of columns and the
// address arithmetic are this design's own. m_rows and n_cols must stay
// stable from `go` to `done`.
module secondary_fpga
  import map_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  output logic              coef_ok,
  input  logic              go,
  input  logic [DIM_W-1:0]  m_rows,
  input  logic [DIM_W-1:0]  n_cols,
  output logic              busy,
  output logic              done,
  // OBM read and write sides
  output obm_req_t          rd_req,
  input  logic [OBM_W-1:0]  rd_data,
  output obm_req_t          wr_req
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_WAIT, S_COLS, S_DRAIN} state_e;

  localparam int unsigned FLUSH     = TAPS - 1;   // 20 zero words per column pair
  localparam int unsigned DRAIN_CYC = 10;
  localparam int unsigned TAG_W     = 1 + LIN_AW;

  state_e             st;
  logic               cl_start, cl_done;
  obm_req_t           cl_req;
  fp32_t              coef [TAPS];
  logic [DIM_W-1:0]   half, pair;
  logic [DIM_W:0]     s;
  logic [LIN_AW-1:0]  col_addr;   // D-F word of step s of the current pair
  logic [LIN_AW-1:0]  back;       // FLUSH rows up plus the D->A bank offset
  logic [3:0]         drain;

  logic               s1_valid, s1_zero;
  logic [TAG_W-1:0]   s1_tag, e_tag;
  logic               e_valid;
  logic [63:0]        e_word;

  assign cl_start = (st == S_IDLE) && load;
  assign busy     = (st == S_COLS) || (st == S_DRAIN);

  coef_loader u_coef (
    .clk, .rst_n, .start(cl_start), .base(bank_base(BANK_E)),
    .req(cl_req), .rdata(rd_data), .coef, .done(cl_done));

  col_conv_engine #(.TAG_W(TAG_W)) u_col (
    .clk, .rst_n, .coef,
    .in_valid(s1_valid), .in_word(s1_zero ? 64'd0 : rd_data), .in_tag(s1_tag),
    .out_valid(e_valid), .out_word(e_word), .out_tag(e_tag));

  always_comb begin
    rd_req = cl_req;
    if (st == S_COLS && s < {1'b0, m_rows}) begin
      rd_req.en   = 1'b1;
      rd_req.we   = 1'b0;
      rd_req.addr = col_addr;
    end
  end

  always_comb begin
    wr_req       = '0;
    wr_req.en    = e_valid && e_tag[TAG_W-1];
    wr_req.we    = 1'b1;
    wr_req.addr  = e_tag[LIN_AW-1:0];
    wr_req.wdata = e_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      coef_ok  <= 1'b0;
      done     <= 1'b0;
      half     <= '0;
      pair     <= '0;
      s        <= '0;
      col_addr <= '0;
      back     <= '0;
      drain    <= '0;
      s1_valid <= 1'b0;
      s1_zero  <= 1'b0;
      s1_tag   <= '0;
    end else begin
      coef_ok  <= 1'b0;
      done     <= 1'b0;
      s1_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (load) st <= S_LOAD;
        S_LOAD:
          if (cl_done) begin
            coef_ok <= 1'b1;
            st      <= S_WAIT;
          end
        S_WAIT:
          if (go) begin
            half     <= n_cols >> 1;
            back     <= LIN_AW'(FLUSH) * LIN_AW'(n_cols >> 1) + bank_base(BANK_D);
            pair     <= '0;
            s        <= '0;
            col_addr <= bank_base(BANK_D);
            st       <= S_COLS;
          end
        S_COLS: begin
          s1_valid <= 1'b1;
          s1_zero  <= (s >= {1'b0, m_rows});
          s1_tag   <= {s >= (DIM_W+1)'(FLUSH), col_addr - back};
          if (s == {1'b0, m_rows} + (DIM_W+1)'(FLUSH) - 1'b1) begin
            s        <= '0;
            pair     <= pair + 1'b1;
            col_addr <= bank_base(BANK_D) + LIN_AW'(pair) + 1'b1;
            if (pair == half - 1'b1) begin
              drain <= '0;
              st    <= S_DRAIN;
            end
          end else begin
            s        <= s + 1'b1;
            col_addr <= col_addr + LIN_AW'(half);
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 4'(DRAIN_CYC - 1)) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
