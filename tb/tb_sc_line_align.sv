// tb_sc_line_align: with eight units per line, target unit 101 of the L1 line
// going to unit 010 of the SC line must fill SC units 000-100 from L1 units
// 011-111 and leave 101-111 unfilled. Then 16-word lines with random offsets
// are checked against a model that walks the L1 line and places each word
// at its distance from the target.
module tb_sc_line_align;
  import sc_pkg::*;
  word_t [7:0]  l8, a8;
  logic  [2:0]  r8, s8;
  logic  [7:0]  m8;
  word_t [15:0] l16, a16;
  logic  [3:0]  r16, s16;
  logic  [15:0] m16;
  int checks = 0, failures = 0;

  sc_line_align #(.WORDS(8))  dut8  (.line_i(l8),  .real_woff_i(r8),  .sym_woff_i(s8),  .aligned_o(a8),  .mask_o(m8));
  sc_line_align #(.WORDS(16)) dut16 (.line_i(l16), .real_woff_i(r16), .sym_woff_i(s16), .aligned_o(a16), .mask_o(m16));

  initial begin
    for (int i = 0; i < 8; i++) l8[i] = 32'h100 + i;
    r8 = 3'b101; s8 = 3'b010;
    #1;
    checks++;
    if (m8 != 8'b0001_1111) begin failures++; $display("FAIL mask %b", m8); end
    for (int j = 0; j < 5; j++) begin
      checks++;
      if (a8[j] != 32'h100 + j + 3) begin failures++; $display("FAIL unit %0d = %h", j, a8[j]); end
    end
    checks++;
    if (a8[2] != 32'h105) begin failures++; $display("FAIL target"); end

    repeat (500) begin
      logic [15:0] em;
      word_t [15:0] ea;
      for (int i = 0; i < 16; i++) l16[i] = $urandom;
      r16 = 4'($urandom); s16 = 4'($urandom);
      em = '0; ea = '0;
      for (int k = 0; k < 16; k++) begin          // L1 word k
        int d;
        d = int'(s16) + k - int'(r16);             // its place in the SC line
        if (d >= 0 && d < 16) begin em[d] = 1'b1; ea[d] = l16[k]; end
      end
      #1;
      checks++;
      if (m16 != em) begin failures++; $display("FAIL mask %b exp %b", m16, em); end
      for (int j = 0; j < 16; j++) if (em[j]) begin
        checks++;
        if (a16[j] != ea[j]) begin failures++; $display("FAIL word %0d", j); end
      end
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
