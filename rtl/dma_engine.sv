// dma_engine: block transfers between common memory and the OBM banks.
//
// A command moves `len` 64-bit words between host word address host_addr and
// linear OBM address obm_addr, in either direction:
//  * host -> OBM: read requests go to the common memory back to back, as
//    fast as host_gnt accepts them; each returning word (host_rvalid, in
//    request order) is written straight into OBM.
//  * OBM -> host: words are read from OBM one per cycle into a 4-entry skid
//    buffer and written to the common memory whenever host_gnt accepts them;
//    OBM reads stop while the buffer could overflow.
// Host port handshake: a request (req, we, addr, wdata) is taken in a cycle
// with host_gnt high; read data comes back later with host_rvalid.
// cmd is taken when cmd_valid is high and busy is low; done pulses for one
// cycle when the last word has been written. The case study invokes such a
// DMA engine from the FPGA code; this queueing scheme is this design's own.
module dma_engine
  import map_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  dma_cmd_t          cmd,
  output logic              busy,
  output logic              done,
  // OBM side
  output obm_req_t          obm_req,
  input  logic [OBM_W-1:0]  obm_rdata,
  // common-memory side
  output host_req_t         host_req,
  input  logic              host_gnt,
  input  logic              host_rvalid,
  input  logic [63:0]       host_rdata
);

  localparam int unsigned FD = 4;

  dma_cmd_t          c;
  logic [LIN_AW-1:0] n_issued, n_done;
  logic              rd_pend;                 // OBM read issued last cycle
  logic [63:0]       fifo [FD];
  logic [1:0]        wp, rp;
  logic [2:0]        cnt;
  logic              issue_host_rd, issue_obm_rd, push, pop;

  assign issue_host_rd = busy && !c.to_host && (n_issued != c.len);
  assign issue_obm_rd  = busy &&  c.to_host && (n_issued != c.len) &&
                         (32'(cnt) + 32'(rd_pend) < FD);
  assign push          = rd_pend;
  assign pop           = busy && c.to_host && (cnt != 0) && host_gnt;

  always_comb begin
    host_req = '0;
    if (issue_host_rd) begin
      host_req.req  = 1'b1;
      host_req.addr = c.host_addr + HOST_AW'(n_issued);
    end else if (busy && c.to_host && cnt != 0) begin
      host_req.req   = 1'b1;
      host_req.we    = 1'b1;
      host_req.addr  = c.host_addr + HOST_AW'(n_done);
      host_req.wdata = fifo[rp];
    end
  end

  always_comb begin
    obm_req = '0;
    if (busy && !c.to_host && host_rvalid) begin
      obm_req.en    = 1'b1;
      obm_req.we    = 1'b1;
      obm_req.addr  = c.obm_addr + n_done;
      obm_req.wdata = host_rdata;
    end else if (issue_obm_rd) begin
      obm_req.en   = 1'b1;
      obm_req.addr = c.obm_addr + n_issued;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      c        <= '0;
      n_issued <= '0;
      n_done   <= '0;
      rd_pend  <= 1'b0;
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
    end else begin
      done    <= 1'b0;
      rd_pend <= issue_obm_rd;
      if (!busy) begin
        if (cmd_valid) begin
          c        <= cmd;
          busy     <= (cmd.len != 0);
          done     <= (cmd.len == 0);
          n_issued <= '0;
          n_done   <= '0;
        end
      end else begin
        if ((issue_host_rd && host_gnt) || issue_obm_rd) n_issued <= n_issued + 1'b1;
        if (push) begin
          fifo[wp] <= obm_rdata;
          wp       <= wp + 1'b1;
        end
        if (pop) rp <= rp + 1'b1;
        cnt <= cnt + 3'(push) - 3'(pop);
        if ((!c.to_host && host_rvalid) || pop) begin
          n_done <= n_done + 1'b1;
          if (n_done + 1'b1 == c.len) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= 3'(FD));

endmodule
