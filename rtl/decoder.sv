// decoder: the Decode block of the ID stage.
//
// Combinational. Turns the instruction word held in IR_D into a ctrl_t
// bundle: which source registers it reads (re1 = rs, re2 = rt, the
// re1_D/re2_D terms of the interlock equation), whether and where it writes
// a GPR (we/ws), the ALU operation and immediate, memory access, branch and
// jump class (BEQZ/BNEZ resolve in EX; J/JAL = jabs and JR/JALR = rind
// redirect from ID), and the system instructions (MFC0, MTC0, RFE, which are
// privileged). An unknown encoding raises the illegal-opcode exception here,
// in ID, as in the exception-source figure; SYSCALL is flagged here as a
// trap. The all-zero word is the no-op used for bubbles. Writes to r0 are
// dropped by clearing `we`. Encoding is MIPS-I (this design's choice).
module decoder
  import pipe5_pkg::*;
(
  input  word_t ir,
  output ctrl_t ctrl
);
  logic [5:0] opc, fn;
  reg_idx_t   rs_f, rt_f, rd_f;
  word_t      sext, zext;

  assign opc  = ir[31:26];
  assign fn   = ir[5:0];
  assign rs_f = ir[25:21];
  assign rt_f = ir[20:16];
  assign rd_f = ir[15:11];
  assign sext = {{16{ir[15]}}, ir[15:0]};
  assign zext = {16'h0, ir[15:0]};

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    unique case (opc)
      OP_SPECIAL: begin
        unique case (fn)
          FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLT: begin
            ctrl.re1 = 1'b1;
            ctrl.re2 = 1'b1;
            ctrl.we  = 1'b1;
            ctrl.ws  = rd_f;
            unique case (fn)
              FN_ADD:  begin ctrl.alu_op = ALU_ADD; ctrl.trap_ovf = 1'b1; end
              FN_SUB:  begin ctrl.alu_op = ALU_SUB; ctrl.trap_ovf = 1'b1; end
              FN_AND:  ctrl.alu_op = ALU_AND;
              FN_OR:   ctrl.alu_op = ALU_OR;
              FN_XOR:  ctrl.alu_op = ALU_XOR;
              default: ctrl.alu_op = ALU_SLT;
            endcase
          end
          FN_JR: begin
            ctrl.re1  = 1'b1;
            ctrl.rind = 1'b1;
          end
          FN_JALR: begin
            ctrl.re1  = 1'b1;
            ctrl.rind = 1'b1;
            ctrl.link = 1'b1;
            ctrl.we   = 1'b1;
            ctrl.ws   = rd_f;
          end
          FN_SYSCALL: ctrl.exc = '{valid: 1'b1, code: EXC_SYS};
          FN_NOP: if (ir != NOP) ctrl.exc = '{valid: 1'b1, code: EXC_RI};
          default: ctrl.exc = '{valid: 1'b1, code: EXC_RI};
        endcase
      end
      OP_J:   ctrl.jabs = 1'b1;
      OP_JAL: begin
        ctrl.jabs = 1'b1;
        ctrl.link = 1'b1;
        ctrl.we   = 1'b1;
        ctrl.ws   = 5'd31;
      end
      OP_BEQZ, OP_BNEZ: begin
        ctrl.re1  = 1'b1;
        ctrl.imm  = sext;
        ctrl.beqz = (opc == OP_BEQZ);
        ctrl.bnez = (opc == OP_BNEZ);
      end
      OP_ADDI, OP_SLTI, OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.re1   = 1'b1;
        ctrl.we    = 1'b1;
        ctrl.ws    = rt_f;
        ctrl.b_imm = 1'b1;
        unique case (opc)
          OP_ADDI: begin ctrl.alu_op = ALU_ADD; ctrl.imm = sext; ctrl.trap_ovf = 1'b1; end
          OP_SLTI: begin ctrl.alu_op = ALU_SLT; ctrl.imm = sext; end
          OP_ANDI: begin ctrl.alu_op = ALU_AND; ctrl.imm = zext; end
          OP_ORI:  begin ctrl.alu_op = ALU_OR;  ctrl.imm = zext; end
          default: begin ctrl.alu_op = ALU_XOR; ctrl.imm = zext; end
        endcase
      end
      OP_LUI: begin
        ctrl.we     = 1'b1;
        ctrl.ws     = rt_f;
        ctrl.b_imm  = 1'b1;
        ctrl.alu_op = ALU_PASSB;
        ctrl.imm    = {ir[15:0], 16'h0};
      end
      OP_LW: begin
        ctrl.re1   = 1'b1;
        ctrl.we    = 1'b1;
        ctrl.ws    = rt_f;
        ctrl.b_imm = 1'b1;
        ctrl.imm   = sext;
        ctrl.load  = 1'b1;
      end
      OP_SW: begin
        ctrl.re1   = 1'b1;
        ctrl.re2   = 1'b1;
        ctrl.b_imm = 1'b1;
        ctrl.imm   = sext;
        ctrl.store = 1'b1;
      end
      OP_COP0: begin
        // imm[4:0] carries the coprocessor-0 register number (rd field)
        ctrl.imm = {27'h0, rd_f};
        if (rs_f == C0_MF) begin
          ctrl.mfc0 = 1'b1;
          ctrl.priv = 1'b1;
          ctrl.we   = 1'b1;
          ctrl.ws   = rt_f;
        end else if (rs_f == C0_MT) begin
          ctrl.mtc0 = 1'b1;
          ctrl.priv = 1'b1;
          ctrl.re2  = 1'b1;
        end else if (rs_f == C0_CO && fn == FN_RFE) begin
          ctrl.rfe  = 1'b1;
          ctrl.priv = 1'b1;
        end else begin
          ctrl.exc = '{valid: 1'b1, code: EXC_RI};
        end
      end
      default: ctrl.exc = '{valid: 1'b1, code: EXC_RI};
    endcase
    if (ctrl.ws == '0) ctrl.we = 1'b0;
  end
endmodule
