// obm_interconnect: routes the OBM requests of several masters to banks A-F.
//
// Every master issues obm_req_t requests with a linear word address; its top
// bits select the bank (addr / 2^BANK_AW) and the low bits the word in it.
// The MAP code sequence gives each bank to one master at a time (DMA engine,
// primary FPGA read or write side, secondary FPGA read or write side), so in
// normal use no two masters address the same bank in one cycle. Should that
// happen anyway, the lowest-numbered port wins, the others are dropped and
// `conflict` is raised for that cycle; an assertion reports it in simulation.
// Read data: each port remembers which bank it read and gets that bank's
// rdata on the next cycle, matching the one-cycle bank read latency.
// The fixed-priority routing is this design's choice; the case study only
// says which chip uses which bank in each phase.
module obm_interconnect
  import map_pkg::*;
#(
  parameter int unsigned NPORTS = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  obm_req_t            req       [NPORTS],
  output logic [OBM_W-1:0]    rdata     [NPORTS],
  output logic                conflict,
  // bank side
  output logic                bank_en    [NUM_BANKS],
  output logic                bank_we    [NUM_BANKS],
  output logic [BANK_AW-1:0]  bank_addr  [NUM_BANKS],
  output logic [OBM_W-1:0]    bank_wdata [NUM_BANKS],
  input  logic [OBM_W-1:0]    bank_rdata [NUM_BANKS]
);

  logic [2:0] sel_bank [NPORTS];
  logic [2:0] rd_bank  [NPORTS];

  always_comb begin
    conflict = 1'b0;
    for (int p = 0; p < NPORTS; p++) sel_bank[p] = 3'(req[p].addr >> BANK_AW);
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_en[b]    = 1'b0;
      bank_we[b]    = 1'b0;
      bank_addr[b]  = '0;
      bank_wdata[b] = '0;
      for (int p = NPORTS - 1; p >= 0; p--) begin
        if (req[p].en && sel_bank[p] == 3'(b)) begin
          if (bank_en[b]) conflict = 1'b1;
          bank_en[b]    = 1'b1;
          bank_we[b]    = req[p].we;
          bank_addr[b]  = req[p].addr[BANK_AW-1:0];
          bank_wdata[b] = req[p].wdata;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int p = 0; p < NPORTS; p++) rd_bank[p] <= '0;
    else
      for (int p = 0; p < NPORTS; p++)
        if (req[p].en && !req[p].we) rd_bank[p] <= sel_bank[p];
  end

  always_comb
    for (int p = 0; p < NPORTS; p++)
      rdata[p] = (rd_bank[p] < 3'(NUM_BANKS)) ? bank_rdata[rd_bank[p]] : '0;

  assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("two OBM masters addressed the same bank in one cycle");

endmodule
