// obm_model: behavioural model of the six OBM banks for block testbenches.
//
// Serves any number of request ports (NP) against one sparse word store
// keyed by linear address; writes land at the clock edge, reads return one
// cycle later on the port's rdata, as the real banks do. Testbenches read
// and fill `store` directly. Unwritten words read as 0.
module obm_model
  import map_pkg::*;
#(
  parameter int NP = 2
) (
  input  logic             clk,
  input  obm_req_t         req   [NP],
  output logic [OBM_W-1:0] rdata [NP]
);
  logic [63:0] store [int];
  int          n_rd = 0, n_wr = 0;

  initial foreach (rdata[p]) rdata[p] = '0;

  always @(posedge clk)
    for (int p = 0; p < NP; p++)
      if (req[p].en) begin
        if (req[p].we) begin
          store[int'(req[p].addr)] = req[p].wdata;
          n_wr++;
        end else begin
          rdata[p] <= store.exists(int'(req[p].addr)) ? store[int'(req[p].addr)] : 64'h0;
          n_rd++;
        end
      end
endmodule
