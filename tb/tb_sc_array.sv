// tb_sc_array: random lookups, stores (full and partial words) and fills on a
// small array (4 sets, 2 ways, 4 words), so that sets fill up and lines are
// evicted often. A reference model kept in the testbench, with per-line
// last-use time stamps for LRU, predicts every lookup response (hit and data)
// and every allocate/evict flag. The model follows the array's rules: a
// lookup sees the state before a write of the same cycle; only a write counts
// as a use when both happen; a tag hit on a lookup is a use even if the word
// is invalid.
module tb_sc_array;
  import sc_pkg::*;
  localparam int SETS = 4, WAYS = 2, WORDS = 4, TAG_W = 3;

  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, rsp_valid, rsp_hit;
  logic [1:0] lk_index = 0, wr_index = 0, lk_woff = 0, wr_woff = 0;
  logic [TAG_W-1:0] lk_tag = 0, wr_tag = 0;
  word_t rsp_data, wr_data = 0;
  logic wr_valid = 0, wr_fill = 0, alloc, evict;
  logic [3:0] wr_be = 0, wr_mask = 0;
  word_t [WORDS-1:0] wr_line = '0;

  sc_array #(.SETS(SETS), .WAYS(WAYS), .WORDS(WORDS), .TAG_W(TAG_W)) dut (
    .clk, .rst_n,
    .lk_valid_i(lk_valid), .lk_index_i(lk_index), .lk_tag_i(lk_tag), .lk_woff_i(lk_woff),
    .rsp_valid_o(rsp_valid), .rsp_hit_o(rsp_hit), .rsp_data_o(rsp_data),
    .wr_valid_i(wr_valid), .wr_fill_i(wr_fill), .wr_index_i(wr_index), .wr_tag_i(wr_tag),
    .wr_woff_i(wr_woff), .wr_data_i(wr_data), .wr_be_i(wr_be), .wr_line_i(wr_line),
    .wr_mask_i(wr_mask), .wr_alloc_o(alloc), .wr_evict_o(evict));

  always #5 clk = ~clk;

  // reference model
  int    m_tag  [SETS][WAYS];
  bit    m_vld  [SETS][WAYS][WORDS];
  word_t m_data [SETS][WAYS][WORDS];
  longint m_used[SETS][WAYS];
  longint now = 0;
  int checks = 0, failures = 0;
  int n_hit = 0, n_evict = 0, n_alloc = 0;

  function automatic bit present(int s, int w);
    for (int k = 0; k < WORDS; k++) if (m_vld[s][w][k]) return 1;
    return 0;
  endfunction

  function automatic int find(int s, int t);
    for (int w = 0; w < WAYS; w++) if (present(s, w) && m_tag[s][w] == t) return w;
    return -1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    bit    exp_hit, exp_alloc, exp_evict;
    word_t exp_data;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      for (int k = 0; k < WORDS; k++) m_vld[s][w][k] = 0;
    end
    // after reset the way with the highest number is the LRU one
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_used[s][w] = -w - 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (6000) begin
      int lw, ww;
      @(negedge clk);
      lk_valid = ($urandom % 2) == 0;
      lk_index = 2'($urandom); lk_tag = 3'($urandom % 4); lk_woff = 2'($urandom);
      wr_valid = ($urandom % 3) == 0;
      wr_fill  = $urandom % 2;
      wr_index = 2'($urandom); wr_tag = 3'($urandom % 4); wr_woff = 2'($urandom);
      wr_data  = $urandom;
      wr_be    = ($urandom % 4 == 0) ? 4'($urandom) : 4'hf;
      wr_mask  = 4'($urandom);
      for (int k = 0; k < WORDS; k++) wr_line[k] = $urandom;
      // model: lookup against the old state
      now++;
      lw = find(lk_index, lk_tag);
      exp_hit  = lk_valid && lw >= 0 && m_vld[lk_index][lw][lk_woff];
      exp_data = exp_hit ? m_data[lk_index][lw][lk_woff] : '0;
      // model: write
      exp_alloc = 0; exp_evict = 0;
      if (wr_valid) begin
        ww = find(wr_index, wr_tag);
        if (ww < 0) begin
          int victim;
          victim = -1;
          exp_alloc = 1;
          for (int w = 0; w < WAYS; w++) if (victim < 0 && !present(wr_index, w)) victim = w;
          if (victim < 0) begin
            exp_evict = 1;
            victim = 0;
            for (int w = 1; w < WAYS; w++)
              if (m_used[wr_index][w] < m_used[wr_index][victim]) victim = w;
          end
          ww = victim;
          m_tag[wr_index][ww] = wr_tag;
          for (int k = 0; k < WORDS; k++) m_vld[wr_index][ww][k] = 0;
        end
        if (wr_fill) begin
          for (int k = 0; k < WORDS; k++) if (wr_mask[k]) begin
            m_vld[wr_index][ww][k] = 1; m_data[wr_index][ww][k] = wr_line[k];
          end
        end else begin
          for (int b = 0; b < 4; b++) if (wr_be[b]) m_data[wr_index][ww][wr_woff][8*b +: 8] = wr_data[8*b +: 8];
          if (wr_be == 4'hf) m_vld[wr_index][ww][wr_woff] = 1;
        end
        m_used[wr_index][ww] = now;
      end else if (lk_valid && lw >= 0) begin
        m_used[lk_index][lw] = now;
      end
      #1;
      check(alloc == exp_alloc && evict == exp_evict, "alloc/evict");
      n_alloc += int'(exp_alloc); n_evict += int'(exp_evict);
      @(posedge clk); #1;
      check(rsp_valid == lk_valid, "rsp_valid");
      check(rsp_hit == exp_hit, "hit");
      if (exp_hit) begin
        n_hit++;
        check(rsp_data == exp_data, "data");
      end
    end
    check(n_hit > 100 && n_evict > 100 && n_alloc > 100, "coverage");
    $display("hits=%0d allocs=%0d evicts=%0d", n_hit, n_alloc, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
