// tb_sc_symaddr: checks the symbolic address of "lw $3,12($sp)" without and
// with the 6-bit P-color 010010 (the two worked examples of the layout), an
// access through another base register, and random fields against the
// arithmetic form disp + base*2**16 + (base==29 ? color*2**21 : 0).
module tb_sc_symaddr;
  import sc_pkg::*;
  logic [4:0]  base;
  logic [15:0] disp;
  logic [5:0]  color;
  sym_addr_t   sym;
  logic        stk;
  int checks = 0, failures = 0;

  sc_symaddr #(.PCOLOR_W(6)) dut (.base_id_i(base), .disp_i(disp), .pcolor_i(color),
                                  .sym_o(sym), .is_stack_o(stk));

  task automatic expect_sym(logic [31:0] exp, bit exp_stk);
    #1;
    checks++;
    if (sym !== exp || stk !== exp_stk) begin
      failures++;
      $display("FAIL base=%0d disp=%h color=%b: sym=%h exp=%h", base, disp, color, sym, exp);
    end
  endtask

  initial begin
    base = 29; disp = 12; color = 0;
    expect_sym(32'b0000_0000_0001_1101_0000_0000_0000_1100, 1);
    color = 6'b010010;
    expect_sym(32'b0000_0010_0101_1101_0000_0000_0000_1100, 1);
    base = 2; disp = 16'hfff8;
    expect_sym(32'h0002_fff8, 0);
    repeat (1000) begin
      logic [31:0] e;
      base = 5'($urandom); disp = 16'($urandom); color = 6'($urandom);
      if ($urandom % 4 == 0) base = 29;
      e = 32'(disp) + 32'(base) * 65536 + ((base == 29) ? 32'(color) * 2097152 : 0);
      expect_sym(e, base == 29);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
