// tb_symbolic_cache: end-to-end test of the symbolic cache at its default
// size (8 KB, 4 ways, 64-byte lines, 6-bit P-color), driven like a processor
// running a program: procedure calls save registers on the stack, returns
// restore them, and other loads and stores go through the global pointer
// and other base registers. The testbench keeps a word memory (the L1 side)
// and the register values, so every load also has its real value.
//
// Phase A, nested calls: each callee saves registers at 64..48($sp), the
//   same displacements as its caller; every restore must hit and return the
//   value saved by the same procedure, which only works if the P-color keeps
//   the activations apart.
// Phase B, line fill: a global load misses, the L1 line is filled around the
//   target word, and the neighbouring symbolic words must hit with the real
//   memory contents while words outside the fitted part must miss.
// Phase C, random program: calls up to depth 40, returns, loads and stores.
//   Every hit must return the last value written to that symbolic word by a
//   store or a fill (kept in a shadow map). Prediction accuracy is printed.
// Throughout: the prediction arrives exactly one cycle after the load, and
// each mechanism (hit, miss, fill, partial fill, eviction, fill held back by
// a store, coloured stack access, call, return) must occur at least once.
module tb_symbolic_cache;
  import sc_pkg::*;
  localparam int WORDS = 16;

  logic clk = 0, rst_n = 0;
  logic call = 0, ret = 0;
  logic [5:0] pcolor;
  logic fe_valid = 0, fe_is_load = 0;
  logic [4:0] fe_base = 0;
  logic [15:0] fe_disp = 0;
  sym_addr_t fe_sym;
  logic fe_is_stack;
  logic pred_valid, pred_hit;
  word_t pred_data;
  logic st_valid = 0;
  sym_addr_t st_sym = 0;
  word_t st_data = 0;
  logic [3:0] st_be = 0;
  logic fill_valid = 0, fill_ready;
  sym_addr_t fill_sym = 0;
  logic [31:0] fill_real = 0;
  word_t [WORDS-1:0] fill_line = '0;
  logic alloc, evict;

  symbolic_cache dut (
    .clk, .rst_n, .call_i(call), .ret_i(ret), .pcolor_o(pcolor),
    .fe_valid_i(fe_valid), .fe_is_load_i(fe_is_load), .fe_base_i(fe_base), .fe_disp_i(fe_disp),
    .fe_sym_o(fe_sym), .fe_is_stack_o(fe_is_stack),
    .pred_valid_o(pred_valid), .pred_hit_o(pred_hit), .pred_data_o(pred_data),
    .st_valid_i(st_valid), .st_sym_i(st_sym), .st_data_i(st_data), .st_be_i(st_be),
    .fill_valid_i(fill_valid), .fill_ready_o(fill_ready), .fill_sym_i(fill_sym),
    .fill_real_addr_i(fill_real), .fill_line_i(fill_line),
    .alloc_o(alloc), .evict_o(evict));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_fill = 0, n_partial = 0, n_evict = 0, n_stall = 0;
  int n_color = 0, n_call = 0, n_ret = 0, n_correct = 0, n_loads = 0;

  // processor state kept by the testbench
  word_t       mem  [int unsigned];   // real memory, by word address
  word_t       last [int unsigned];   // last value written per symbolic word
  logic [31:0] regs [32];
  int          depth = 0;

  always @(posedge clk) if (rst_n && evict) n_evict++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic word_t rd_mem(logic [31:0] a);
    if (mem.exists(a >> 2)) return mem[a >> 2];
    return (a >> 2) * 32'h9E37_79B1 + 32'h1234_5678;   // untouched memory
  endfunction

  // one front-end access; returns the symbolic address, and for a load the
  // prediction, checked to arrive one cycle later
  task automatic front_end(bit is_load, logic [4:0] base, logic [15:0] disp,
                           output sym_addr_t sym, output bit hit, output word_t data);
    @(negedge clk);
    fe_valid = 1; fe_is_load = is_load; fe_base = base; fe_disp = disp;
    #1 sym = fe_sym;
    if (fe_is_stack && pcolor != 0) n_color++;
    @(negedge clk);
    fe_valid = 0;
    check(pred_valid == is_load, "prediction one cycle after the load");
    hit = pred_hit; data = pred_data;
    @(negedge clk);
    check(!pred_valid, "single prediction");
  endtask

  task automatic do_store(logic [4:0] base, logic [15:0] disp, word_t value);
    sym_addr_t sym; bit h; word_t d;
    logic [31:0] a;
    front_end(0, base, disp, sym, h, d);
    a = regs[base] + 32'(signed'(disp));
    mem[a >> 2] = value;
    st_valid = 1; st_sym = sym; st_data = value; st_be = 4'hf;
    @(negedge clk);
    st_valid = 0;
    last[sym >> 2] = value;
  endtask

  // fill after a miss; with collide set, a store to another symbolic word is
  // issued in the same cycle and the fill must wait one cycle
  task automatic do_fill(sym_addr_t sym, logic [31:0] a, bit collide);
    logic [31:0] lbase;
    int shift;
    lbase = a & ~32'd63;
    fill_valid = 1; fill_sym = sym; fill_real = a;
    for (int k = 0; k < WORDS; k++) fill_line[k] = rd_mem(lbase + 32'(4 * k));
    if (collide) begin
      st_valid = 1; st_sym = 32'h07E0_0000 | (32'($urandom) & 32'h1F_FFFC); st_data = $urandom; st_be = 4'hf;
      #1 check(!fill_ready, "fill held back by a store");
      n_stall++;
      last[st_sym >> 2] = st_data;
      @(negedge clk);
      st_valid = 0;
    end
    #1 check(fill_ready, "fill accepted");
    @(negedge clk);
    fill_valid = 0;
    n_fill++;
    // model of the alignment: the target word goes to the symbolic word
    // offset and the rest keep their distance from it
    shift = int'(sym[5:2]) - int'(a[5:2]);
    if (shift != 0) n_partial++;
    for (int k = 0; k < WORDS; k++) begin
      int j;
      j = k + shift;
      if (j >= 0 && j < WORDS)
        last[((sym & ~32'd63) >> 2) + 32'(j)] = fill_line[k];
    end
  endtask

  task automatic do_load(logic [4:0] base, logic [15:0] disp, bit collide,
                         output bit hit, output word_t pred);
    sym_addr_t sym;
    logic [31:0] a;
    front_end(1, base, disp, sym, hit, pred);
    a = regs[base] + 32'(signed'(disp));
    n_loads++;
    if (hit) begin
      n_hit++;
      check(last.exists(sym >> 2) && last[sym >> 2] == pred, "hit returns last written value");
      if (pred == rd_mem(a)) n_correct++;
    end else begin
      n_miss++;
      do_fill(sym, a, collide);
    end
  endtask

  task automatic do_call();
    @(negedge clk);
    call = 1;
    @(negedge clk);
    call = 0;
    regs[29] -= 72;
    depth++;
    n_call++;
  endtask

  task automatic do_ret();
    @(negedge clk);
    ret = 1;
    @(negedge clk);
    ret = 0;
    regs[29] += 72;
    depth--;
    n_ret++;
  endtask

  // save registers 31, 30, 18, 17, 16 at 64..48($sp) with values tagged
  // by the call depth
  task automatic prologue();
    for (int r = 0; r < 5; r++) do_store(29, 16'(64 - 4 * r), 32'hA000_0000 | (depth << 8) | r);
  endtask

  task automatic epilogue(bit must_hit);
    for (int r = 0; r < 5; r++) begin
      bit h; word_t v;
      do_load(29, 16'(64 - 4 * r), 0, h, v);
      if (must_hit) begin
        check(h, "restore hits");
        check(v == (32'hA000_0000 | (depth << 8) | r), "restore returns own save");
      end
    end
  endtask

  initial begin
    bit h; word_t v;
    for (int r = 0; r < 32; r++) regs[r] = 32'h2000_0000 + 32'(r) * 32'h0001_0100;
    regs[29] = 32'h7FFF_8000;   // $sp
    regs[28] = 32'h1000_8014;   // $gp, not line aligned
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- phase A: nested procedures
    for (int d = 0; d < 3; d++) begin do_call(); prologue(); end
    for (int d = 0; d < 3; d++) begin epilogue(1); do_ret(); end
    check(pcolor == 0 && depth == 0, "P-color back to 0");

    // ---- phase B: fill around the target word
    // 0x48($gp): symbolic word 2, real word 7 of its line
    do_load(28, 16'h48, 1, h, v);
    check(!h, "first global load misses");
    // symbolic words 0..10 come from real words 5..15 and must hit;
    // symbolic word 11 was left unfilled and must miss
    for (int m = -2; m <= 9; m++) begin
      logic [15:0] d2;
      d2 = 16'(32'h48 + 4 * m);
      do_load(28, d2, 0, h, v);
      check(h == (m <= 8), $sformatf("fitted word %0d hit=%0d", m, h));
      if (h) check(v == rd_mem(regs[28] + 32'(d2)), "filled word holds memory contents");
    end

    // ---- phase C: random program
    repeat (3000) begin
      int op;
      op = $urandom % 10;
      if (op < 2 && depth < 40) begin
        do_call(); prologue();
      end else if (op < 4 && depth > 0) begin
        epilogue(0); do_ret();
      end else if (op < 7) begin
        logic [4:0] b;
        b = ($urandom % 2 == 1) ? 5'd28 : 5'(4 + $urandom % 4);
        do_load(b, 16'(($urandom % 256) * 4), ($urandom % 8) == 0, h, v);
      end else begin
        logic [4:0] b;
        b = ($urandom % 2 == 1) ? 5'd28 : 5'(4 + $urandom % 4);
        do_store(b, 16'(($urandom % 256) * 4), $urandom);
      end
    end

    check(n_hit > 0,     "mechanism: hit");
    check(n_miss > 0,    "mechanism: miss");
    check(n_fill > 0,    "mechanism: fill");
    check(n_partial > 0, "mechanism: partial fill");
    check(n_evict > 0,   "mechanism: eviction");
    check(n_stall > 0,   "mechanism: fill held back");
    check(n_color > 0,   "mechanism: coloured stack access");
    check(n_call > 0 && n_ret > 0, "mechanism: call and return");
    $display("loads=%0d hits=%0d correct=%0d (%0d%%) fills=%0d partial=%0d evictions=%0d stalls=%0d coloured=%0d calls=%0d returns=%0d",
             n_loads, n_hit, n_correct, (n_loads > 0) ? 100 * n_correct / n_loads : 0,
             n_fill, n_partial, n_evict, n_stall, n_color, n_call, n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
