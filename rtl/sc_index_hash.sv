// sc_index_hash: randomized set index and tag of a symbolic address.
//
// Displacements are mostly small, so the index bits taken straight from the
// displacement (the bits just above the line offset) are mostly 0 and would
// crowd a few sets. The index is therefore the XOR of those bits with the
// same number of bits starting at bit 16, i.e. the base register ID and the
// low P-color bits. This randomization is the design's; with 64 sets and
// 64-byte lines it XORs bits 11:6 with bits 21:16.
//
// The tag is the symbolic address above the index bits. It identifies the
// line uniquely: bits OFF_BITS+IDX_W-1:OFF_BITS are recovered from the index
// and tag bits 16+IDX_W-1:16, which the tag holds. Keeping exactly these bits
// as the tag is an own choice.
//
// Interface: sym_i in; index_o, tag_o and word offset woff_o out.
// Purely combinational.
module sc_index_hash
  import sc_pkg::*;
#(
  parameter int unsigned IDX_W    = 5,  // log2 of the number of sets
  parameter int unsigned OFF_BITS = 6   // log2 of the line size in bytes
) (
  input  sym_addr_t                         sym_i,
  output logic [IDX_W-1:0]                  index_o,
  output logic [SYM_W-OFF_BITS-IDX_W-1:0]   tag_o,
  output logic [OFF_BITS-$clog2(WORD_BYTES)-1:0] woff_o
);
  if (OFF_BITS + IDX_W > BASE_LSB) begin : g_bad_width
    $error("index bits overlap the base register field");
  end

  assign index_o = sym_i[OFF_BITS +: IDX_W] ^ sym_i[BASE_LSB +: IDX_W];
  assign tag_o   = sym_i[SYM_W-1:OFF_BITS+IDX_W];
  assign woff_o  = sym_i[OFF_BITS-1:$clog2(WORD_BYTES)];
endmodule
