// sc_pkg: shared constants of the symbolic cache.
//
// The symbolic address is a 32-bit value built from the syntax of a load or
// store instruction: bits 15:0 hold the 16-bit displacement, bits 20:16 the
// 5-bit base register ID, and the bits above hold the procedure colour
// (P-color) for stack accesses. These field positions follow the symbolic
// address layout of the design; the register number of the stack pointer (29,
// the MIPS $sp) is the one shown in its worked example.
package sc_pkg;
  localparam int unsigned SYM_W      = 32;  // symbolic address width
  localparam int unsigned DISP_W     = 16;  // displacement field, bits 15:0
  localparam int unsigned REGID_W    = 5;   // base register ID, bits 20:16
  localparam int unsigned BASE_LSB   = 16;  // position of the base register ID
  localparam int unsigned PCOLOR_LSB = 21;  // position of the P-color field
  localparam int unsigned WORD_W     = 32;  // access unit of the alignment (word)
  localparam int unsigned WORD_BYTES = WORD_W / 8;
  localparam logic [REGID_W-1:0] SP_REG_ID = 5'd29;  // $sp

  typedef logic [SYM_W-1:0]  sym_addr_t;
  typedef logic [WORD_W-1:0] word_t;
endpackage
