// map_top: MAP processor computing a separable 2D convolution in one call.
//
// The whole 2DCONVOLUTION runs on the reconfigurable processor: the host
// makes one MAP call (`start` with the image size and four common-memory
// word addresses) and gets `done` when the convolved image is back in common
// memory. Inside:
//   * primary_fpga (master chip): kernels in by DMA, image in by one DMA to
//     OBM banks A-C, row pass A-C -> D-F, hand-over, image out by one DMA;
//   * secondary_fpga (slave chip): column kernel from bank E, waits for the
//     primary, column pass D-F -> A-C;
//   * dma_engine: the only path to common memory (the host_* port);
//   * six obm_bank instances A-F (64 bits x 2^19 words each) behind an
//     obm_interconnect with five master ports:
//       0 DMA, 1 primary read, 2 primary write, 3 secondary read,
//       4 secondary write.
// Common-memory layout expected at the host addresses: Hr and Hc as 11 words
// each (two fp32 coefficients per word, coefficient 0 in bits 31:0), the
// input image row after row, two pixels per word (lower column index in bits
// 31:0); the output image is written in the same layout. The result is
//   B[m,n] = sum_i Hc[i] * ( sum_j A[m+i, n+j] * Hr[j] )
// with pixels beyond the last row or column read as zero.
// `busy` is high from start to done; `err` reports a rejected image size.
module map_top
  import map_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
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
  output logic               obm_conflict,   // two masters on one bank (never expected)
  // common memory
  output host_req_t          host_req,
  input  logic               host_gnt,
  input  logic               host_rvalid,
  input  logic [63:0]        host_rdata
);

  localparam int unsigned NPORTS = 5;

  obm_req_t           req   [NPORTS];
  logic [OBM_W-1:0]   rdata [NPORTS];
    logic               bank_en    [NUM_BANKS];
  logic               bank_we    [NUM_BANKS];
  logic [BANK_AW-1:0] bank_addr  [NUM_BANKS];
  logic [OBM_W-1:0]   bank_wdata [NUM_BANKS];
  logic [OBM_W-1:0]   bank_rdata [NUM_BANKS];

  logic               dma_cmd_valid, dma_busy, dma_done;
  dma_cmd_t           dma_cmd;
  logic               sec_load, sec_coef_ok, sec_go, sec_done, sec_busy;
  logic [DIM_W-1:0]   m_q, n_q;

  primary_fpga u_primary (
    .clk, .rst_n, .start, .m_rows, .n_cols, .hr_addr, .hc_addr,
    .img_in_addr, .img_out_addr, .busy, .done, .err, .m_q, .n_q,
    .dma_cmd_valid, .dma_cmd, .dma_busy, .dma_done,
    .rd_req(req[1]), .rd_data(rdata[1]), .wr_req(req[2]),
    .sec_load, .sec_coef_ok, .sec_go, .sec_done);

  secondary_fpga u_secondary (
    .clk, .rst_n, .load(sec_load), .coef_ok(sec_coef_ok), .go(sec_go),
    .m_rows(m_q), .n_cols(n_q), .busy(sec_busy), .done(sec_done),
    .rd_req(req[3]), .rd_data(rdata[3]), .wr_req(req[4]));

  dma_engine u_dma (
    .clk, .rst_n, .cmd_valid(dma_cmd_valid), .cmd(dma_cmd), .busy(dma_busy),
    .done(dma_done), .obm_req(req[0]), .obm_rdata(rdata[0]),
    .host_req, .host_gnt, .host_rvalid, .host_rdata);

  obm_interconnect #(.NPORTS(NPORTS)) u_xbar (
    .clk, .rst_n, .req, .rdata, .conflict(obm_conflict),
    .bank_en, .bank_we, .bank_addr, .bank_wdata, .bank_rdata);

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    obm_bank u_bank (
      .clk, .en(bank_en[b]), .we(bank_we[b]), .addr(bank_addr[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b]));
  end

  // The master starts the slave's column pass only when the slave is idle,
  // and never issues a DMA while the slave works on the banks.
  assert property (@(posedge clk) disable iff (!rst_n) sec_go |-> !sec_busy);
  assert property (@(posedge clk) disable iff (!rst_n) sec_busy |-> !dma_busy);

endmodule
