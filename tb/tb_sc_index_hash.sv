// tb_sc_index_hash: with 64 sets of 64-byte lines, the symbolic address
// 0x025D000C ($sp, displacement 12, P-color 010010) must give the randomized
// index 011101. Random addresses are then checked against index =
// ((a / 64) mod 64) xor ((a / 65536) mod 64), tag = a / 4096 and word
// offset = (a / 4) mod 16.
module tb_sc_index_hash;
  import sc_pkg::*;
  sym_addr_t   sym;
  logic [5:0]  idx;
  logic [19:0] tag;
  logic [3:0]  woff;
  int checks = 0, failures = 0;

  sc_index_hash #(.IDX_W(6), .OFF_BITS(6)) dut (.sym_i(sym), .index_o(idx), .tag_o(tag), .woff_o(woff));

  task automatic expect_out(int unsigned ei, int unsigned et, int unsigned ew);
    #1;
    checks++;
    if (idx != 6'(ei) || tag != 20'(et) || woff != 4'(ew)) begin
      failures++;
      $display("FAIL sym=%h idx=%b/%b tag=%h/%h woff=%0d/%0d", sym, idx, 6'(ei), tag, et, woff, ew);
    end
  endtask

  initial begin
    sym = 32'h025D_000C;
    expect_out(6'b011101, 32'h025D000C / 4096, 3);
    repeat (2000) begin
      int unsigned a;
      a = $urandom;
      sym = a;
      expect_out(((a / 64) % 64) ^ ((a / 65536) % 64), a / 4096, (a / 4) % 16);
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
