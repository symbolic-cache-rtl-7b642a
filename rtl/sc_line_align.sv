// sc_line_align: word alignment of an L1 line into a symbolic cache line.
//
// The word offset of a symbolic address need not equal the word offset of
// the real address, so an L1 line cannot be copied into the SC line as it
// is. The target word (at real_woff_i in the L1 line) is placed at sym_woff_i
// in the SC line and every other word keeps its distance from the target:
// SC word j receives L1 word j + (real_woff_i - sym_woff_i). SC words whose
// source would lie outside the L1 line stay unfilled (mask bit 0) and L1
// words that would land outside the SC line are dropped. This shift, the
// word granularity and the partial fill are the design's; both lines having
// the same number of words is an own choice.
//
// Interface: line_i (word w in line_i[w]), the two word offsets; aligned_o and
// fill mask mask_o out. Purely combinational.
module sc_line_align
  import sc_pkg::*;
#(
  parameter int unsigned WORDS = 16
) (
  input  word_t [WORDS-1:0]            line_i,
  input  logic  [$clog2(WORDS)-1:0]    real_woff_i,
  input  logic  [$clog2(WORDS)-1:0]    sym_woff_i,
  output word_t [WORDS-1:0]            aligned_o,
  output logic  [WORDS-1:0]            mask_o
);
  localparam int unsigned OW = $clog2(WORDS);

  always_comb begin
    for (int unsigned j = 0; j < WORDS; j++) begin
      // source = j + real - sym, computed one bit wider to see both bounds
      logic [OW+1:0] src;
      src = (OW+2)'(j) + (OW+2)'(real_woff_i) - (OW+2)'(sym_woff_i);
      if (src[OW+1] || src[OW]) begin   // negative or beyond the line
        aligned_o[j] = '0;
        mask_o[j]    = 1'b0;
      end else begin
        aligned_o[j] = line_i[src[OW-1:0]];
        mask_o[j]    = 1'b1;
      end
    end
  end
endmodule
