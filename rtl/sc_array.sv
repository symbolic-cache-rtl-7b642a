// sc_array: tag, valid and data storage of the symbolic cache.
//
// A SETS x WAYS set-associative array of symbolic lines, WORDS words each.
// Every word has its own valid bit, because a miss fills only the part of a
// line that the aligned L1 line covers. A line is present when any of its
// words is valid. Three operations use it:
//   lookup  (front end, loads): tag compare in the set; the result is a hit
//           only when the tag matches and the addressed word is valid.
//   store   (every store updates the cache): the enabled bytes of the word
//           are written; on a tag miss the LRU way of the set is taken over
//           and all its words are invalidated first. A word becomes valid
//           when all four bytes are written or it was valid already.
//   fill    (after a load missed): the masked words of an aligned line are
//           written and made valid; on a tag miss the LRU way is taken over
//           and only the masked words become valid.
// The array itself, per-line tags and the partial fill follow the design.
// Own choices, where the design is silent: true LRU replacement (invalid
// ways first), lookups, stores and fills all count as uses for LRU, a fill
// overwrites words already valid, and state is cleared by reset.
//
// Timing: lookup_* is sampled on a clock edge and answered by rsp_* in the
// next cycle (one-cycle read, as a small SRAM). A lookup sees the array as it
// was before a write in the same cycle. One write (store or fill) per cycle;
// wr_fill_i selects which.
module sc_array
  import sc_pkg::*;
#(
  parameter int unsigned SETS  = 32,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned WORDS = 16,
  parameter int unsigned TAG_W = 21,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned OW    = $clog2(WORDS),
  localparam int unsigned AW    = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lk_valid_i,
  input  logic [IDX_W-1:0]  lk_index_i,
  input  logic [TAG_W-1:0]  lk_tag_i,
  input  logic [OW-1:0]     lk_woff_i,
  output logic              rsp_valid_o,
  output logic              rsp_hit_o,
  output word_t             rsp_data_o,
  // write: store (wr_fill_i = 0) or fill (wr_fill_i = 1)
  input  logic              wr_valid_i,
  input  logic              wr_fill_i,
  input  logic [IDX_W-1:0]  wr_index_i,
  input  logic [TAG_W-1:0]  wr_tag_i,
  input  logic [OW-1:0]     wr_woff_i,   // store: word offset
  input  word_t             wr_data_i,   // store: data
  input  logic [WORD_BYTES-1:0] wr_be_i, // store: byte enables
  input  word_t [WORDS-1:0] wr_line_i,   // fill: aligned line
  input  logic [WORDS-1:0]  wr_mask_i,   // fill: words present
  output logic              wr_alloc_o,  // this write took over a way
  output logic              wr_evict_o   // ... and that way held a line
);
  logic [TAG_W-1:0]        tag_q   [SETS][WAYS];
  logic [WORDS-1:0]        wvld_q  [SETS][WAYS];
  logic [AW-1:0]           age_q   [SETS][WAYS];   // 0 = most recently used
  word_t [WORDS-1:0]       data_q  [SETS][WAYS];

  // ---------------------------------------------------------------- lookup
  logic          lk_hit;
  logic [AW-1:0] lk_way;
  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (wvld_q[lk_index_i][w] != '0 && tag_q[lk_index_i][w] == lk_tag_i) begin
        lk_hit = 1'b1;
        lk_way = AW'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid_o <= 1'b0;
      rsp_hit_o   <= 1'b0;
      rsp_data_o  <= '0;
    end else begin
      rsp_valid_o <= lk_valid_i;
      rsp_hit_o   <= lk_valid_i && lk_hit && wvld_q[lk_index_i][lk_way][lk_woff_i];
      rsp_data_o  <= data_q[lk_index_i][lk_way][lk_woff_i];
    end
  end

  // ----------------------------------------------------------------- write
  logic          wr_hit;
  logic [AW-1:0] wr_way, victim;
  logic          victim_free;
  always_comb begin
    wr_hit = 1'b0;
    wr_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (wvld_q[wr_index_i][w] != '0 && tag_q[wr_index_i][w] == wr_tag_i) begin
        wr_hit = 1'b1;
        wr_way = AW'(w);
      end
    end
    // victim: the lowest invalid way, else the least recently used one
    victim      = '0;
    victim_free = 1'b0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (age_q[wr_index_i][w] == AW'(WAYS-1) && !victim_free) victim = AW'(w);
    end
    for (int w = WAYS-1; w >= 0; w--) begin
      if (wvld_q[wr_index_i][w] == '0) begin
        victim      = AW'(w);
        victim_free = 1'b1;
      end
    end
  end

  assign wr_alloc_o = wr_valid_i && !wr_hit;
  assign wr_evict_o = wr_valid_i && !wr_hit && !victim_free;

  // the way touched this cycle, for LRU: the write wins over the lookup
  logic          use_valid;
  logic [IDX_W-1:0] use_index;
  logic [AW-1:0] use_way;
  always_comb begin
    use_valid = 1'b0;
    use_index = lk_index_i;
    use_way   = lk_way;
    if (wr_valid_i) begin
      use_valid = 1'b1;
      use_index = wr_index_i;
      use_way   = wr_hit ? wr_way : victim;
    end else if (lk_valid_i && lk_hit) begin
      use_valid = 1'b1;
    end
  end

  logic [AW-1:0] tgt;
  assign tgt = wr_hit ? wr_way : victim;

  // word valid bits of the written line after the write
  logic [WORDS-1:0] wvld_next;
  always_comb begin
    wvld_next = wr_hit ? wvld_q[wr_index_i][tgt] : '0;
    if (wr_fill_i)           wvld_next |= wr_mask_i;
    else if (wr_be_i == '1)  wvld_next[wr_woff_i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          wvld_q[s][w] <= '0;
          age_q[s][w]  <= AW'(w);
          tag_q[s][w]  <= '0;
        end
      end
    end else begin
      if (wr_valid_i) begin
        if (!wr_hit) tag_q[wr_index_i][tgt] <= wr_tag_i;
        wvld_q[wr_index_i][tgt] <= wvld_next;
      end
      if (use_valid) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (AW'(w) == use_way)
            age_q[use_index][w] <= '0;
          else if (age_q[use_index][w] < age_q[use_index][use_way])
            age_q[use_index][w] <= age_q[use_index][w] + 1'b1;
        end
      end
    end
  end

  // data array: no reset, read only where valid
  always_ff @(posedge clk) begin
    if (wr_valid_i) begin
      if (wr_fill_i) begin
        for (int unsigned k = 0; k < WORDS; k++)
          if (wr_mask_i[k]) data_q[wr_index_i][tgt][k] <= wr_line_i[k];
      end else begin
        for (int unsigned b = 0; b < WORD_BYTES; b++)
          if (wr_be_i[b]) data_q[wr_index_i][tgt][wr_woff_i][8*b +: 8] <= wr_data_i[8*b +: 8];
      end
    end
  end
endmodule
