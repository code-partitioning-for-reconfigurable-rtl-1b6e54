// map_pkg: types and constants shared by the convolution MAP design.
//
// The MAP processor has six on-board memory (OBM) banks A-F, each 64 bits
// wide and 4 MB deep (2^19 words). All OBM traffic in this design uses a
// linear word address: bank = addr / 2^19, offset = addr % 2^19, so banks
// A..F occupy linear words 0 .. 6*2^19-1. A 64-bit word holds two
// single-precision pixels: the lower-indexed pixel in bits 31:0, the next
// one in bits 63:32 (this packing is a design choice).
package map_pkg;

  // Kernel width: 21 coefficients of a damped sinc (the case-study kernel).
  localparam int unsigned TAPS       = 21;
  // Words needed to hold TAPS packed coefficients (two per 64-bit word).
  localparam int unsigned COEF_WORDS = (TAPS + 1) / 2;

  localparam int unsigned OBM_W      = 64;   // bank width in bits
  localparam int unsigned NUM_BANKS  = 6;    // banks A-F
  localparam int unsigned BANK_AW    = 19;   // 4 MB / 8 B = 2^19 words
  localparam int unsigned LIN_AW     = BANK_AW + 3; // bank number + offset

  localparam int unsigned HOST_AW    = 30;   // 8 GB common memory, 64-bit words
  localparam int unsigned DIM_W      = 16;   // image dimension register width

  typedef logic [31:0] fp32_t;

  typedef enum logic [2:0] {
    BANK_A = 3'd0, BANK_B = 3'd1, BANK_C = 3'd2,
    BANK_D = 3'd3, BANK_E = 3'd4, BANK_F = 3'd5
  } bank_e;

  // One OBM access, issued by any master (DMA engine, FPGA read/write port).
  typedef struct packed {
    logic              en;     // access this cycle
    logic              we;     // 1 = write, 0 = read (data back next cycle)
    logic [LIN_AW-1:0] addr;   // linear word address over banks A-F
    logic [OBM_W-1:0]  wdata;
  } obm_req_t;

  // One common-memory access from the DMA engine.
  typedef struct packed {
    logic               req;
    logic               we;
    logic [HOST_AW-1:0] addr;  // 64-bit word address
    logic [63:0]        wdata;
  } host_req_t;

  // DMA command: copy len words between common memory and OBM.
  typedef struct packed {
    logic               to_host;   // 0: host -> OBM, 1: OBM -> host
    logic [HOST_AW-1:0] host_addr;
    logic [LIN_AW-1:0]  obm_addr;
    logic [LIN_AW-1:0]  len;       // words
  } dma_cmd_t;

  // Linear address of word 0 of a bank.
  function automatic logic [LIN_AW-1:0] bank_base(bank_e b);
    return LIN_AW'(b) << BANK_AW;
  endfunction

endpackage
