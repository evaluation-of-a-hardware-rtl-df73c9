// svp_alu: integer execute unit for the operate-format instructions of the
// base RISC ISA (a subset of the Alpha integer operate instructions).
//
// The core executes binary code of a conventional 64-bit RISC ISA (Alpha)
// extended for SVP. This unit covers the integer operate group used by the
// test programs: ADDQ, SUBQ, S8ADDQ, CMPEQ, CMPLT, CMPULT (opcode 0x10),
// AND, BIS, XOR (0x11), SLL, SRL (0x12) and MULQ (0x13), with the standard
// Alpha opcode/function numbers. Which subset is supported is this design's
// choice; floating point is not included.
// Purely combinational: result is valid in the cycle the operands are.
// 'known' is low for an opcode/function pair outside the subset.
module svp_alu
  import svp_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [6:0] func,
  input  word_t      a,
  input  word_t      b,
  output word_t      y,
  output logic       known
);

  always_comb begin
    y = '0;
    known = 1'b1;
    unique case ({opcode, func})
      {6'h10, 7'h20}: y = a + b;                                   // ADDQ
      {6'h10, 7'h29}: y = a - b;                                   // SUBQ
      {6'h10, 7'h32}: y = (a << 3) + b;                            // S8ADDQ
      {6'h10, 7'h2D}: y = word_t'(a == b);                         // CMPEQ
      {6'h10, 7'h4D}: y = word_t'($signed(a) < $signed(b));        // CMPLT
      {6'h10, 7'h1D}: y = word_t'(a < b);                          // CMPULT
      {6'h11, 7'h00}: y = a & b;                                   // AND
      {6'h11, 7'h20}: y = a | b;                                   // BIS
      {6'h11, 7'h40}: y = a ^ b;                                   // XOR
      {6'h12, 7'h39}: y = a << b[5:0];                             // SLL
      {6'h12, 7'h34}: y = a >> b[5:0];                             // SRL
      {6'h13, 7'h20}: y = a * b;                                   // MULQ
      default: known = 1'b0;
    endcase
  end

endmodule
