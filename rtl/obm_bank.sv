// obm_bank: one on-board memory (OBM) bank of the MAP processor.
//
// A single-port synchronous memory, 64 bits wide and 2^AW words deep
// (2^19 x 8 bytes = 4 MB by default, as each of the six banks A-F). One
// access per cycle: a write stores wdata at addr; a read returns the word
// at addr on rdata one cycle later. rdata holds its value on idle cycles and
// after writes. The memory itself is not reset. Bank geometry follows the
// platform description; the one-cycle read latency is this design's choice.
module obm_bank
  import map_pkg::*;
#(
  parameter int unsigned AW = BANK_AW,
  parameter int unsigned W  = OBM_W
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
