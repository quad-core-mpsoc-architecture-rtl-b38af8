// pdpid_pkg: constants and types shared by the parallel PID MPSoC.
//
// The enhanced PicoBlaze (EPM) talks to everything through its 8-bit I/O
// ports. This package fixes the port map that the input multiplexing
// interface and the output decoding interface both decode, the FPU opcodes,
// the bit layout of the HWID/READY status byte and the PicoBlaze bus widths
// (10-bit instruction address, 18-bit instruction word, 8-bit data). The
// port numbers and encodings are this design's own choice; the document
// only says that the ports exist and that the HWID is 2 bits wide.
package pdpid_pkg;

  localparam int unsigned NCORES   = 4;   // quad-core
  localparam int unsigned HWID_W   = 2;   // 2-bit hardware identifier
  localparam int unsigned IADDR_W  = 10;  // PicoBlaze program address
  localparam int unsigned INSTR_W  = 18;  // PicoBlaze instruction word
  localparam int unsigned FP_W     = 32;  // single-precision float

  typedef logic [7:0] byte_t;
  typedef logic [HWID_W-1:0] hwid_t;

  // FPU operation codes (written to P_FPU_OP)
  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2
  } fpu_op_e;

  // ---------------- output ports (OUTPUT sX, pp) ----------------
  localparam byte_t P_FPU_A0    = 8'h00;  // 0x00..0x03: operand A, byte 0 = LSB
  localparam byte_t P_FPU_B0    = 8'h04;  // 0x04..0x07: operand B
  localparam byte_t P_FPU_OP    = 8'h08;  // write starts an operation, data[1:0] = op
  localparam byte_t P_RAM_ALO   = 8'h10;  // QP-RAM address, low byte
  localparam byte_t P_RAM_AHI   = 8'h11;  // QP-RAM address, high bits
  localparam byte_t P_RAM_WD    = 8'h12;  // write data: stores at the address, then address+1
  localparam byte_t P_SYNC      = 8'h20;  // bit0: set own READY, bit1: clear own START
  localparam byte_t P_START     = 8'h21;  // master: bit s set => START to core s, clears its READY
  localparam byte_t P_E_LATCH   = 8'h22;  // master: let a new error sample through R
  localparam byte_t P_U0        = 8'h30;  // 0x30..0x33: U bytes, writing byte 3 commits U

  // ---------------- input ports (INPUT sX, pp) ----------------
  localparam byte_t P_FPU_R0    = 8'h00;  // 0x00..0x03: FPU result
  localparam byte_t P_FPU_ST    = 8'h08;  // bit0: result valid (operation finished)
  localparam byte_t P_RAM_RD    = 8'h12;  // read data at the address; reading advances it
  localparam byte_t P_HWID_RDY  = 8'h20;  // [1:0] HWID, [2] own START, [7:4] READY of cores 3..0
  localparam byte_t P_E0        = 8'h30;  // 0x30..0x33: error sample E(k)


endpackage
