// primary_fpga: the primary user FPGA of the MAP processor (master chip).
//
// It runs the MAP function for the whole separable 2D convolution and does
// the per-row half of the work itself. On `start` it checks the image size
// and then steps through:
//   1. DMA the column kernel Hc into bank E and the row kernel Hr into bank F
//      (one 11-word DMA each), then tell the secondary chip (sec_load) that
//      its kernel is in bank E;
//   2. copy Hr from bank F into on-chip registers (coef_loader);
//   3. DMA the whole M x N image into banks A-C (one DMA);
//   4. wait until the secondary chip has its kernel, so that the row results
//      cannot overwrite it in bank E;
//   5. row pass: for each row, stream N/2 words from A-C through the
//      row_conv_engine followed by 10 zero words, and write the N/2 result
//      words to banks D-F at the same offsets. One word is read and one
//      written per cycle, so a row takes N/2 + 10 cycles;
//   6. pulse sec_go and wait for sec_done (the secondary chip overwrites A-C
//      with the column-convolved image);
//   7. DMA banks A-C out to img_out_addr and pulse `done`.
// The image occupies linear OBM words 0 .. M*N/2-1, i.e. A-C used as one
// 12 MB region; its row-pass copy is at the same offset in D-F. Allowed sizes:
// N even and >= 2, M >= 1, M*N/2 <= 3*2^19 words. Any other size ends the
// call at once with `err` set. The step order, the bank use and the
// master/slave hand-over follow the case study; the kernel hand-shake in
// step 4, the address map and the size check are this design's own.
module primary_fpga
  import map_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // MAP function call
  input  logic               start,
  input  logic [DIM_W-1:0]   m_rows,
  input  logic [DIM_W-1:0]   n_cols,
  input  logic [HOST_AW-1:0] hr_addr,
  input  logic [HOST_AW-1:0] hc_addr,
  input  logic [HOST_AW-1:0] img_in_addr,
  input  logic [HOST_AW-1:0] img_out_addr,
  output logic               busy,
  output logic               done,
  output logic               err,
  // image size as latched at start, for the secondary chip
  output logic [DIM_W-1:0]   m_q,
  output logic [DIM_W-1:0]   n_q,
  // DMA engine
  output logic               dma_cmd_valid,
  output dma_cmd_t           dma_cmd,
  input  logic               dma_busy,
  input  logic               dma_done,
  // OBM read and write sides
  output obm_req_t           rd_req,
  input  logic [OBM_W-1:0]   rd_data,
  output obm_req_t           wr_req,
  // secondary chip hand-shake
  output logic               sec_load,
  input  logic               sec_coef_ok,
  output logic               sec_go,
  input  logic               sec_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_DMA_E, S_DMA_F, S_COPY_F, S_DMA_IMG, S_SYNC,
    S_ROWS, S_DRAIN, S_WAIT_SEC, S_DMA_OUT
  } state_e;

  localparam int unsigned HALF_TAPS = (TAPS - 1) / 2;  // 10 flush words per row
  localparam int unsigned DRAIN_CYC = 10;              // > engine latency + 1
  localparam int unsigned TAG_W     = 1 + LIN_AW;      // {write, address}

  state_e              st;
  logic                issued;       // DMA command of the current state sent
  logic [DIM_W-1:0]    half, row, k;
  logic [LIN_AW-1:0]   row_base, img_words;
  logic [3:0]          drain;
  logic                sec_ok_q;

  // coefficient copy
  logic      cl_start, cl_done;
  obm_req_t  cl_req;
  fp32_t     coef [TAPS];

  // row pass pipeline
  logic              s1_valid, s1_zero;
  logic [TAG_W-1:0]  s1_tag, e_tag;
  logic              e_valid;
  logic [63:0]       e_word;

  logic size_ok;
  assign size_ok = (n_cols[0] == 1'b0) && (n_cols != 0) && (m_rows != 0) &&
                   ((32'(m_rows) * 32'(n_cols)) / 2 <= 3 * (32'd1 << BANK_AW));

  assign busy = (st != S_IDLE);
  assign cl_start = (st == S_COPY_F) && !issued;

  coef_loader u_coef (
    .clk, .rst_n, .start(cl_start), .base(bank_base(BANK_F)),
    .req(cl_req), .rdata(rd_data), .coef, .done(cl_done));

  row_conv_engine #(.TAG_W(TAG_W)) u_row (
    .clk, .rst_n, .coef,
    .in_valid(s1_valid), .in_word(s1_zero ? 64'd0 : rd_data), .in_tag(s1_tag),
    .out_valid(e_valid), .out_word(e_word), .out_tag(e_tag));

  // DMA command for the current state.
  always_comb begin
    dma_cmd       = '0;
    dma_cmd_valid = 1'b0;
    unique case (st)
      S_DMA_E: begin
        dma_cmd.host_addr = hc_addr;
        dma_cmd.obm_addr  = bank_base(BANK_E);
        dma_cmd.len       = LIN_AW'(COEF_WORDS);
      end
      S_DMA_F: begin
        dma_cmd.host_addr = hr_addr;
        dma_cmd.obm_addr  = bank_base(BANK_F);
        dma_cmd.len       = LIN_AW'(COEF_WORDS);
      end
      S_DMA_IMG: begin
        dma_cmd.host_addr = img_in_addr;
        dma_cmd.obm_addr  = bank_base(BANK_A);
        dma_cmd.len       = img_words;
      end
      S_DMA_OUT: begin
        dma_cmd.to_host   = 1'b1;
        dma_cmd.host_addr = img_out_addr;
        dma_cmd.obm_addr  = bank_base(BANK_A);
        dma_cmd.len       = img_words;
      end
      default: ;
    endcase
    if ((st == S_DMA_E || st == S_DMA_F || st == S_DMA_IMG || st == S_DMA_OUT) &&
        !issued && !dma_busy)
      dma_cmd_valid = 1'b1;
  end

  // OBM read side: coefficient copy, then the row sweep.
  always_comb begin
    rd_req = cl_req;
    if (st == S_ROWS && k < half) begin
      rd_req.en   = 1'b1;
      rd_req.we   = 1'b0;
      rd_req.addr = row_base + LIN_AW'(k);
    end
  end

  // OBM write side: results of the row engine into D-F.
  always_comb begin
    wr_req       = '0;
    wr_req.en    = e_valid && e_tag[TAG_W-1];
    wr_req.we    = 1'b1;
    wr_req.addr  = e_tag[LIN_AW-1:0];
    wr_req.wdata = e_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      issued    <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
      m_q       <= '0;
      n_q       <= '0;
      half      <= '0;
      row       <= '0;
      k         <= '0;
      row_base  <= '0;
      img_words <= '0;
      drain     <= '0;
      sec_ok_q  <= 1'b0;
      sec_load  <= 1'b0;
      sec_go    <= 1'b0;
      s1_valid  <= 1'b0;
      s1_zero   <= 1'b0;
      s1_tag    <= '0;
    end else begin
      done     <= 1'b0;
      sec_load <= 1'b0;
      sec_go   <= 1'b0;
      s1_valid <= 1'b0;
      if (sec_coef_ok) sec_ok_q <= 1'b1;
      if (dma_cmd_valid || cl_start) issued <= 1'b1;

      unique case (st)
        S_IDLE:
          if (start) begin
            err <= !size_ok;
            if (size_ok) begin
              m_q       <= m_rows;
              n_q       <= n_cols;
              half      <= n_cols >> 1;
              img_words <= LIN_AW'((32'(m_rows) * 32'(n_cols)) >> 1);
              sec_ok_q  <= 1'b0;
              issued    <= 1'b0;
              st        <= S_DMA_E;
            end else begin
              done <= 1'b1;
            end
          end
        S_DMA_E:
          if (issued && dma_done) begin issued <= 1'b0; st <= S_DMA_F; end
        S_DMA_F:
          if (issued && dma_done) begin
            issued   <= 1'b0;
            sec_load <= 1'b1;
            st       <= S_COPY_F;
          end
        S_COPY_F:
          if (cl_done) begin issued <= 1'b0; st <= S_DMA_IMG; end
        S_DMA_IMG:
          if (issued && dma_done) begin issued <= 1'b0; st <= S_SYNC; end
        S_SYNC:
          if (sec_ok_q || sec_coef_ok) begin
            row      <= '0;
            k        <= '0;
            row_base <= '0;
            st       <= S_ROWS;
          end
        S_ROWS: begin
          s1_valid <= 1'b1;
          s1_zero  <= (k >= half);
          s1_tag   <= {k >= DIM_W'(HALF_TAPS),
                       bank_base(BANK_D) + row_base + LIN_AW'(k) - LIN_AW'(HALF_TAPS)};
          if (k == half + DIM_W'(HALF_TAPS) - 1'b1) begin
            k        <= '0;
            row      <= row + 1'b1;
            row_base <= row_base + LIN_AW'(half);
            if (row == m_q - 1'b1) begin
              drain <= '0;
              st    <= S_DRAIN;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 4'(DRAIN_CYC - 1)) begin
            sec_go <= 1'b1;
            st     <= S_WAIT_SEC;
          end
        end
        S_WAIT_SEC:
          if (sec_done) begin issued <= 1'b0; st <= S_DMA_OUT; end
        S_DMA_OUT:
          if (issued && dma_done) begin
            issued <= 1'b0;
            done   <= 1'b1;
            st     <= S_IDLE;
          end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
