// host_mem_model: behavioural model of the host's common memory, as seen by
// the MAP DMA engine (testbench only, not synthesizable).
//
// 64-bit words, 2^AW of them. A request is accepted in a cycle where gnt is
// high; gnt is withheld at random (GNT_PCT percent of cycles granted, or
// every cycle once GNT_FORCE is set) to exercise back-pressure. Read data returns in request order, LAT to LAT+3
// cycles after acceptance. Testbenches fill and inspect `mem` directly.
module host_mem_model
  import map_pkg::*;
#(
  parameter int AW      = 16,
  parameter int LAT     = 4,
  parameter int GNT_PCT = 70
) (
  input  logic        clk,
  input  host_req_t   req,
  output logic        gnt,
  output logic        rvalid,
  output logic [63:0] rdata
);

  logic [63:0] mem [2**AW];
  longint      now = 0;
  longint      due_q [$];
  logic [63:0] dat_q [$];
  longint      last_due = 0;
  int          n_reads = 0, n_writes = 0, n_stalls = 0;
  bit          GNT_FORCE = 0;   // set to grant every cycle

  initial begin gnt = 1'b0; rvalid = 1'b0; rdata = '0; end

  always @(posedge clk) begin
    longint d;
    now++;
    if (req.req && gnt) begin
      if (req.addr >= HOST_AW'(2**AW)) $fatal(1, "host address %0h out of model range", req.addr);
      if (req.we) begin
        mem[req.addr[AW-1:0]] <= req.wdata;
        n_writes++;
      end else begin
        d = now + LAT + $urandom_range(3, 0);
        if (d <= last_due) d = last_due + 1;
        last_due = d;
        due_q.push_back(d);
        dat_q.push_back(mem[req.addr[AW-1:0]]);
        n_reads++;
      end
    end else if (req.req) n_stalls++;
    rvalid <= 1'b0;
    if (due_q.size() > 0 && due_q[0] <= now) begin
      rvalid <= 1'b1;
      rdata  <= dat_q[0];
      void'(due_q.pop_front());
      void'(dat_q.pop_front());
    end
    gnt <= GNT_FORCE || ($urandom_range(99, 0) < GNT_PCT);
  end

endmodule
