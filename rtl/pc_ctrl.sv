// pc_ctrl: control of the PC mux and of the IR muxes of ID and EX.
//
// Combinational. Implements the pipeline's control equations, with the
// older instruction always winning:
//   1. an exception taken at the commit point (MA) selects the handler PC,
//      kills IF, ID and EX (bubbles into ID, EX, MA) and kills the MA
//      writeback; an RFE committing in MA selects EPC and kills IF, ID, EX;
//   2. a taken BEQZ/BNEZ in EX selects br and turns IR_D and IR_E into nops
//      (IRSrc_D = IRSrc_E = nop);
//   3. a stall holds PC and IR_D and injects a nop into EX
//      (IRSrc_E = stall.nop + !stall.IR_D);
//   4. J/JAL in ID select jabs, JR/JALR select rind, and the wrong-path
//      instruction being fetched is replaced by a nop in IR_D; in the
//      variant that resolves branches in ID, a taken branch there acts the
//      same way, selecting br;
//   5. otherwise pc+4.
// Items 2 to 5 are the document's equations; item 1 and its priority
// follow its exception-handling figure (kill signals, handler PC select).
module pc_ctrl
  import pipe5_pkg::*;
(
  input  logic    exc_take,    // exception/interrupt taken in MA
  input  logic    rfe_take,    // RFE commits in MA
  input  logic    br_taken_d,  // taken branch in ID (branch-in-ID variant)
  input  logic    br_taken_e,  // BEQZ.z + BNEZ.!z in EX
  input  logic    jabs_d,      // J, JAL in ID
  input  logic    rind_d,      // JR, JALR in ID
  input  logic    stall,       // interlock from hazard_unit
  output pc_src_t pc_src,
  output logic    pc_en,       // load the PC register
  output logic    d_en,        // load IR_D / PC_D
  output logic    ir_d_nop,    // IRSrc_D = nop
  output logic    ir_e_nop,    // IRSrc_E = nop
  output logic    kill_e,      // bubble into MA (kill EX stage)
  output logic    kill_wb      // bubble into WB (kill writeback)
);
  always_comb begin
    pc_src   = PC_PLUS4;
    pc_en    = 1'b1;
    d_en     = 1'b1;
    ir_d_nop = 1'b0;
    ir_e_nop = 1'b0;
    kill_e   = 1'b0;
    kill_wb  = 1'b0;
    if (exc_take || rfe_take) begin
      pc_src   = exc_take ? PC_HND : PC_EPC;
      ir_d_nop = 1'b1;
      ir_e_nop = 1'b1;
      kill_e   = 1'b1;
      kill_wb  = exc_take;
    end else if (br_taken_e) begin
      pc_src   = PC_BR;
      ir_d_nop = 1'b1;
      ir_e_nop = 1'b1;
    end else if (stall) begin
      pc_en    = 1'b0;
      d_en     = 1'b0;
      ir_e_nop = 1'b1;
    end else if (br_taken_d) begin
      pc_src   = PC_BR;
      ir_d_nop = 1'b1;
    end else if (jabs_d) begin
      pc_src   = PC_JABS;
      ir_d_nop = 1'b1;
    end else if (rind_d) begin
      pc_src   = PC_RIND;
      ir_d_nop = 1'b1;
    end
  end
endmodule
