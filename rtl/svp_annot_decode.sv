// svp_annot_decode: instruction annotation lookup for one I-cache line.
//
// A 64-byte instruction cache line holds 16 32-bit words. Word 0 is not an
// instruction: it packs the 2-bit annotations of the 15 instructions in words
// 1..15, instruction k (in word k+1) at bits [2k+3:2k+2]; bits [1:0] are
// unused. This layout is taken from the cache-line figure of the design.
// Annotations: CONTINUE (no effect), SWCH (switch to another thread after
// this instruction) and END (the thread terminates after it); their 2-bit
// encodings (0, 1, 2) are this design's own.
// Given the line and a word index, this block returns the instruction word,
// its annotation, and whether the next word lies beyond the end of the line.
// Purely combinational.
module svp_annot_decode
  import svp_pkg::*;
(
  input  logic [LINE_BITS-1:0] line,
  input  logic [3:0]           word,    // 1..15
  output logic [31:0]          instr,
  output annot_e               annot,
  output logic                 last_in_line
);

  logic [31:0] w0;
  logic [3:0]  k;

  always_comb begin
    w0    = line[31:0];
    instr = line[32*word +: 32];
    k     = word - 4'd1;
    annot = annot_e'(w0[2*k + 2 +: 2]);
    last_in_line = (word == 4'd15);
  end

endmodule
