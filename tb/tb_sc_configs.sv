// tb_sc_configs: runs the register save/restore pattern on symbolic caches
// of several sizes (4-way, 64-byte lines) and checks how many restores hit.
// Each procedure's five saved words span two symbolic lines, and because
// every activation uses the same displacements, all activations compete for
// the same two sets unless P-color bits reach the index:
//   16 lines  (4 sets),   depth 4: 4 frames fit in 4 ways      -> 20 of 20 hit
//   16 lines  (4 sets),   depth 6: LRU keeps the inner 4       -> 20 of 30 hit
//   128 lines (32 sets),  depth 8: index has no P-color bit    -> 20 of 40 hit
//   256 lines (64 sets),  depth 8: index bit 5 = P-color bit 0 -> 40 of 40 hit
//   512 lines (128 sets), depth 8: two P-color bits in index   -> 40 of 40 hit
// The 64-set cache must also give symbolic address 0x025D000C and index
// 011101 for "lw $3,12($sp)" under P-color 010010. No hit may return a
// value other than its own procedure's save.
module tb_sc_configs;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  localparam int N = 5;
  logic [N-1:0] done;
  int hits [N];
  int wrong [N];
  logic [31:0] sym [N];
  int idx [N];
  int checks = 0, failures = 0;

  sc_frame_harness #(.SETS(4),   .DEPTH(4)) h0 (.clk, .rst_n, .start_i(start), .done_o(done[0]), .hits_o(hits[0]), .wrong_o(wrong[0]), .ex_sym_o(sym[0]), .ex_index_o(idx[0]));
  sc_frame_harness #(.SETS(4),   .DEPTH(6)) h1 (.clk, .rst_n, .start_i(start), .done_o(done[1]), .hits_o(hits[1]), .wrong_o(wrong[1]), .ex_sym_o(sym[1]), .ex_index_o(idx[1]));
  sc_frame_harness #(.SETS(32),  .DEPTH(8)) h2 (.clk, .rst_n, .start_i(start), .done_o(done[2]), .hits_o(hits[2]), .wrong_o(wrong[2]), .ex_sym_o(sym[2]), .ex_index_o(idx[2]));
  sc_frame_harness #(.SETS(64),  .DEPTH(8)) h3 (.clk, .rst_n, .start_i(start), .done_o(done[3]), .hits_o(hits[3]), .wrong_o(wrong[3]), .ex_sym_o(sym[3]), .ex_index_o(idx[3]));
  sc_frame_harness #(.SETS(128), .DEPTH(8)) h4 (.clk, .rst_n, .start_i(start), .done_o(done[4]), .hits_o(hits[4]), .wrong_o(wrong[4]), .ex_sym_o(sym[4]), .ex_index_o(idx[4]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_hits [N] = '{20, 20, 20, 40, 40};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start = 1;
    wait (&done);
    for (int i = 0; i < N; i++) begin
      $display("config %0d: restores hit %0d, wrong %0d", i, hits[i], wrong[i]);
      check(hits[i] == exp_hits[i], $sformatf("config %0d hits %0d, expected %0d", i, hits[i], exp_hits[i]));
      check(wrong[i] == 0, "no wrong value");
      check(sym[i] == 32'h025D_000C, "symbolic address of lw $3,12($sp)");
    end
    check(idx[3] == 6'b011101, "randomized index with 64 sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
