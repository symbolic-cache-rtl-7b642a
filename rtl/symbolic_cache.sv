// symbolic_cache: a small cache addressed by the syntax of loads and stores.
//
// Loads and stores name their memory operand as "displacement(base register)".
// Stores and loads that touch the same data very often use the same base
// register and displacement, and neighbouring data neighbouring
// displacements. The symbolic cache (SC) therefore indexes a small cache with
// a symbolic address made from those instruction fields, so a load can get a
// speculative value as soon as it has been fetched, before register read,
// address generation and the L1 access. The processor still performs the real
// load and checks the value; no coherence with L1 is kept.
//
// Parts: pcolor_counter (procedure colour, counted on calls and returns),
// sc_symaddr (symbolic address), sc_index_hash (randomized index and tag),
// sc_array (tags, per-word valid bits, data, LRU) and sc_line_align (fits an
// L1 line around the target word on a fill).
//
// Interface and timing:
//   call_i / ret_i      decode saw a procedure call / return (one pulse each).
//   fe_*                front end: one load or store per cycle. fe_sym_o is its
//                       symbolic address in the same cycle (combinational);
//                       the pipeline carries it along with the instruction,
//                       since the P-color may change before the instruction
//                       reaches the back end.
//   pred_*              one cycle after a load on fe_*: pred_hit_o says
//                       whether pred_data_o is a speculative value for it.
//   st_*                back end: a store updates the SC (every store does).
//   fill_*              back end: after an SC miss, the L1 line that holds the
//                       load's real address, with that address; the target word
//                       is put at the symbolic word offset. A store in the same
//                       cycle has priority: fill_ready_o is low and the fill
//                       must be held until it is accepted.
// The symbolic address layout, P-color on $sp accesses only, XOR index
// randomization, word alignment with partial fill and store updates follow
// the design. The handshakes, the one-cycle lookup and the store priority are
// own choices. Defaults: an 8 KB, 4-way SC of 64-byte lines with a 6-bit
// P-color. The L1 line is taken to be as long as the SC line.
module symbolic_cache
  import sc_pkg::*;
#(
  parameter int unsigned SETS       = 32,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned PCOLOR_W   = 6,
  localparam int unsigned WORDS     = LINE_BYTES / WORD_BYTES,
  localparam int unsigned OFF_BITS  = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned TAG_W     = SYM_W - OFF_BITS - IDX_W,
  localparam int unsigned OW        = $clog2(WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // procedure colouring
  input  logic                call_i,
  input  logic                ret_i,
  output logic [PCOLOR_W-1:0] pcolor_o,
  // front end: load/store syntax
  input  logic                fe_valid_i,
  input  logic                fe_is_load_i,
  input  logic [REGID_W-1:0]  fe_base_i,
  input  logic [DISP_W-1:0]   fe_disp_i,
  output sym_addr_t           fe_sym_o,
  output logic                fe_is_stack_o,
  // speculative load value, one cycle later
  output logic                pred_valid_o,
  output logic                pred_hit_o,
  output word_t               pred_data_o,
  // back end: store update
  input  logic                st_valid_i,
  input  sym_addr_t           st_sym_i,
  input  word_t               st_data_i,
  input  logic [WORD_BYTES-1:0] st_be_i,
  // back end: line fill after a miss
  input  logic                fill_valid_i,
  output logic                fill_ready_o,
  input  sym_addr_t           fill_sym_i,
  input  logic [31:0]         fill_real_addr_i,
  input  word_t [WORDS-1:0]   fill_line_i,
  // activity, for statistics
  output logic                alloc_o,
  output logic                evict_o
);
  // ------------------------------------------------------- front end path
  pcolor_counter #(.PCOLOR_W(PCOLOR_W)) u_pcolor (
    .clk, .rst_n, .call_i, .ret_i, .pcolor_o
  );

  sc_symaddr #(.PCOLOR_W(PCOLOR_W)) u_symaddr (
    .base_id_i (fe_base_i),
    .disp_i    (fe_disp_i),
    .pcolor_i  (pcolor_o),
    .sym_o     (fe_sym_o),
    .is_stack_o(fe_is_stack_o)
  );

  logic [IDX_W-1:0] lk_index;
  logic [TAG_W-1:0] lk_tag;
  logic [OW-1:0]    lk_woff;
  sc_index_hash #(.IDX_W(IDX_W), .OFF_BITS(OFF_BITS)) u_hash_lk (
    .sym_i(fe_sym_o), .index_o(lk_index), .tag_o(lk_tag), .woff_o(lk_woff)
  );

  // -------------------------------------------------------- back end path
  logic      wr_fill;
  sym_addr_t wr_sym;
  assign fill_ready_o = !st_valid_i;
  assign wr_fill      = fill_valid_i && !st_valid_i;
  assign wr_sym       = st_valid_i ? st_sym_i : fill_sym_i;

  logic [IDX_W-1:0] wr_index;
  logic [TAG_W-1:0] wr_tag;
  logic [OW-1:0]    wr_woff;
  sc_index_hash #(.IDX_W(IDX_W), .OFF_BITS(OFF_BITS)) u_hash_wr (
    .sym_i(wr_sym), .index_o(wr_index), .tag_o(wr_tag), .woff_o(wr_woff)
  );

  word_t [WORDS-1:0] fill_aligned;
  logic  [WORDS-1:0] fill_mask;
  sc_line_align #(.WORDS(WORDS)) u_align (
    .line_i     (fill_line_i),
    .real_woff_i(fill_real_addr_i[OFF_BITS-1:$clog2(WORD_BYTES)]),
    .sym_woff_i (wr_woff),
    .aligned_o  (fill_aligned),
    .mask_o     (fill_mask)
  );

  sc_array #(.SETS(SETS), .WAYS(WAYS), .WORDS(WORDS), .TAG_W(TAG_W)) u_array (
    .clk, .rst_n,
    .lk_valid_i (fe_valid_i && fe_is_load_i),
    .lk_index_i (lk_index),
    .lk_tag_i   (lk_tag),
    .lk_woff_i  (lk_woff),
    .rsp_valid_o(pred_valid_o),
    .rsp_hit_o  (pred_hit_o),
    .rsp_data_o (pred_data_o),
    .wr_valid_i (st_valid_i || wr_fill),
    .wr_fill_i  (wr_fill),
    .wr_index_i (wr_index),
    .wr_tag_i   (wr_tag),
    .wr_woff_i  (wr_woff),
    .wr_data_i  (st_data_i),
    .wr_be_i    (st_be_i),
    .wr_line_i  (fill_aligned),
    .wr_mask_i  (fill_mask),
    .wr_alloc_o (alloc_o),
    .wr_evict_o (evict_o)
  );

  // A held fill must stay stable until accepted. The assertion is disabled
  // during reset; that use of rst_n is what makes lint report it as both a
  // synchronous and an asynchronous signal, and it has no hardware effect.
  property p_fill_hold;
    @(posedge clk) disable iff (!rst_n)
      fill_valid_i && !fill_ready_o |=> fill_valid_i && $stable(fill_sym_i);
  endproperty
  a_fill_hold: assert property (p_fill_hold);
endmodule
