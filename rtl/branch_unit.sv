// branch_unit: branch resolution in the EX stage (the "BEQZ?" decision).
//
// Combinational. Tests operand A (the rs value read in ID) for zero and
// decides whether the BEQZ or BNEZ now in EX is taken:
//   taken = BEQZ.z + BNEZ.!z
// and forms the target PC_E + 4 + (offset << 2), so that "100: BEQZ +200"
// branches to 304 as in the pipeline diagrams. Branches resolve in EX, two
// stages after fetch, which costs two bubbles when taken. Word-scaled
// offsets follow MIPS (this design's choice).
module branch_unit
  import pipe5_pkg::*;
(
  input  word_t a,
  input  word_t pc_e,
  input  word_t imm,
  input  logic  is_beqz,
  input  logic  is_bnez,
  output logic  zero,
  output logic  taken,
  output word_t target
);
  assign zero   = (a == '0);
  assign taken  = (is_beqz && zero) || (is_bnez && !zero);
  assign target = pc_e + word_t'(4) + {imm[XLEN-3:0], 2'b00};
endmodule
