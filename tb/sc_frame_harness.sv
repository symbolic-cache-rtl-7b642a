// sc_frame_harness: drives one symbolic cache with the register save and
// restore pattern of a compiled procedure (five stores at 64..48($sp) after
// the call, five loads from the same places before the return), DEPTH
// procedures deep, and counts how many restores hit with the value their
// own procedure saved. The restores of the innermost procedure come first.
// Afterwards it makes 18 more calls and forms the symbolic address of
// "lw $3,12($sp)" (P-color 010010) to expose the address and the set index.
// Used by tb_sc_configs to compare cache sizes and organisations.
module sc_frame_harness
  import sc_pkg::*;
#(
  parameter int unsigned SETS  = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start_i,
  output logic      done_o,
  output int        hits_o,
  output int        wrong_o,
  output sym_addr_t ex_sym_o,
  output int        ex_index_o
);
  logic call = 0, ret = 0, fe_valid = 0, fe_is_load = 0, st_valid = 0;
  logic [4:0] fe_base = 29;
  logic [15:0] fe_disp = 0;
  sym_addr_t fe_sym, st_sym = 0;
  word_t st_data = 0, pred_data;
  logic [5:0] pcolor;
  logic fe_is_stack, pred_valid, pred_hit, fill_ready, alloc, evict;

  symbolic_cache #(.SETS(SETS)) dut (
    .clk, .rst_n, .call_i(call), .ret_i(ret), .pcolor_o(pcolor),
    .fe_valid_i(fe_valid), .fe_is_load_i(fe_is_load), .fe_base_i(fe_base), .fe_disp_i(fe_disp),
    .fe_sym_o(fe_sym), .fe_is_stack_o(fe_is_stack),
    .pred_valid_o(pred_valid), .pred_hit_o(pred_hit), .pred_data_o(pred_data),
    .st_valid_i(st_valid), .st_sym_i(st_sym), .st_data_i(st_data), .st_be_i(4'hf),
    .fill_valid_i(1'b0), .fill_ready_o(fill_ready), .fill_sym_i('0),
    .fill_real_addr_i('0), .fill_line_i('0),
    .alloc_o(alloc), .evict_o(evict));

  task automatic pulse(bit c);
    @(negedge clk);
    call = c; ret = !c;
    @(negedge clk);
    call = 0; ret = 0;
  endtask

  initial begin
    done_o = 0; hits_o = 0; wrong_o = 0; ex_sym_o = '0; ex_index_o = 0;
    wait (start_i);
    for (int d = 1; d <= int'(DEPTH); d++) begin
      pulse(1);
      for (int r = 0; r < 5; r++) begin
        @(negedge clk);
        fe_valid = 1; fe_is_load = 0; fe_disp = 16'(64 - 4 * r);
        #1 st_sym = fe_sym;
        @(negedge clk);
        fe_valid = 0;
        st_valid = 1; st_data = 32'h5A00_0000 | (d << 8) | r;
        @(negedge clk);
        st_valid = 0;
      end
    end
    for (int d = int'(DEPTH); d >= 1; d--) begin
      for (int r = 0; r < 5; r++) begin
        @(negedge clk);
        fe_valid = 1; fe_is_load = 1; fe_disp = 16'(64 - 4 * r);
        @(negedge clk);
        fe_valid = 0;
        if (pred_hit) begin
          if (pred_data == (32'h5A00_0000 | (d << 8) | r)) hits_o++;
          else wrong_o++;
        end
      end
      pulse(0);
    end
    repeat (18) pulse(1);
    @(negedge clk);
    fe_disp = 12;
    #1 ex_sym_o = fe_sym;
    ex_index_o = int'(dut.u_hash_lk.index_o);
    done_o = 1;
  end
endmodule
