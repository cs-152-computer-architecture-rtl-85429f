// pc_select: the next-PC multiplexer in front of the PC register.
//
// Combinational. Holds the "0x4 Add" incrementer and forms the four PCSrc
// choices of the pipeline figures: pc+4 (sequential fetch), jabs (J/JAL in
// ID: upper four bits of PC_D+4 joined with the 26-bit instruction index,
// word-scaled, as in MIPS), rind (JR/JALR in ID: the register value read in
// ID) and br (taken branch in EX). Two more inputs come from the exception
// logic at the commit point: the fixed handler address and EPC (for RFE).
module pc_select
  import pipe5_pkg::*;
(
  input  word_t       pc,
  input  word_t       pc_d,
  input  logic [25:0] instr_index,
  input  word_t       rind,
  input  word_t       br_target,
  input  word_t       handler_pc,
  input  word_t       epc,
  input  pc_src_t     pc_src,
  output word_t       pc4,
  output word_t       next_pc
);
  word_t pc_d4, jabs;

  assign pc4   = pc + word_t'(4);
  assign pc_d4 = pc_d + word_t'(4);
  assign jabs  = {pc_d4[XLEN-1:28], instr_index, 2'b00};

  always_comb begin
    unique case (pc_src)
      PC_JABS: next_pc = jabs;
      PC_RIND: next_pc = rind;
      PC_BR:   next_pc = br_target;
      PC_HND:  next_pc = handler_pc;
      PC_EPC:  next_pc = epc;
      default: next_pc = pc4;
    endcase
  end
endmodule
