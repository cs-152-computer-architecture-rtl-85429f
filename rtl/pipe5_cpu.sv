// pipe5_cpu: five-stage in-order pipeline with interlocks, EX-stage branch
// resolution and precise exceptions.
//
// Stages: IF (PC, instruction memory), ID (IR_D, decode, register read,
// interlock, J/JAL/JR/JALR redirect), EX (ALU, branch test and target),
// MA (data memory, commit point, Cause/EPC), WB (register write).
//
// Hazards are handled the way the document develops them:
//  * Data hazards: no bypassing. An instruction in ID that reads a register
//    still to be written by an instruction in EX, MA or WB stalls; PC and
//    IR_D hold and a nop enters EX (hazard_unit).
//  * Jumps are known in ID: the next PC comes from the jump, and the one
//    instruction already fetched behind the jump is replaced by a nop.
//  * BEQZ/BNEZ resolve in EX: when taken, the two younger instructions (in
//    IF and ID) are replaced by nops, and the ID stall is cancelled because
//    the instruction it would hold is on the wrong path (pc_ctrl).
//    There are no branch delay slots. With BRANCH_IN_ID = 1 a second
//    branch_unit tests the register-file output in ID instead, and a taken
//    branch then costs one bubble, exactly like a jump.
//  * Exceptions: flags ride down the pipe with their instruction
//    (IF: misaligned PC, ID: illegal opcode / syscall, EX: overflow, MA:
//    misaligned data address, privileged instruction). They act only at the
//    commit point in MA, where asynchronous interrupts are also injected
//    (exc_unit). Taking one writes Cause and EPC, kills IF, ID, EX and the
//    MA writeback, and fetches from HANDLER_PC. Stores write memory only
//    when they commit; GPRs are written only in WB.
//
// A bubble is an all-zero instruction with its valid bit cleared; a valid
// bit travels with every stage so that the retirement port reports only
// real instructions.
//
// Interface: imem_* is a load port for the instruction memory. rt_* reports
// each instruction completing in WB (one per cycle at most). exc_* reports
// an exception or interrupt being taken (in the same cycle as the
// instruction that takes it sits in MA). stall, br_taken, jump_d and
// rfe_take expose the pipeline's control events.
// Timing: one instruction per cycle without hazards; a taken branch costs
// two bubbles, a jump one, a stall one bubble per cycle stalled; an
// exception reaches the handler's first fetch one cycle after its
// instruction is in MA.
// The ISA encoding (MIPS-I subset), memory sizes, reset PC and handler
// address are this design's choices; the document gives none of them.
// Two assertions at the end check that an exception and a taken branch
// always belong to a real (valid) instruction. They use rst_n in their
// `disable iff`, which lint reports as the reset being used both
// asynchronously and synchronously; the logic itself resets asynchronously
// only.
module pipe5_cpu
  import pipe5_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0000_0000,
  parameter word_t       HANDLER_PC = 32'h0000_0100,
  // 0: BEQZ/BNEZ resolve in EX (two bubbles when taken).
  // 1: an extra zero test on the register-file output resolves them in ID
  //    (one bubble when taken, like a jump).
  parameter bit          BRANCH_IN_ID = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIRQ-1:0] irq,
  // instruction memory load port
  input  logic            imem_we,
  input  word_t           imem_waddr,
  input  word_t           imem_wdata,
  // retirement (WB)
  output logic            rt_valid,
  output word_t           rt_pc,
  output logic            rt_we,
  output reg_idx_t        rt_ws,
  output word_t           rt_wd,
  // exception taken at the commit point
  output logic            exc_take,
  output exc_code_t       exc_cause,
  output word_t           exc_epc,
  // control events
  output logic            stall,
  output logic            br_taken,
  output logic            jump_d,
  output logic            rfe_take
);

  // ------------------------------------------------------------ IF
  word_t   pc_f, next_pc, pc4_f, inst_f;
  exc_t    exc_f;

  // ------------------------------------------------------------ ID
  word_t   ir_d, pc_d;
  logic    valid_d;
  exc_t    exc_fd;          // flag raised in IF, held in ID
  ctrl_t   ctrl_raw, ctrl_d;
  word_t   rd1_d, rd2_d;

  // ------------------------------------------------------------ EX
  logic    valid_e;
  word_t   pc_e, a_e, b_e;
  ctrl_t   ctrl_e;
  exc_t    exc_e;
  word_t   alu_b, alu_y, y_e, br_target_e;
  logic    ovf_e, zero_e, br_taken_ex;
  exc_t    exc_e_out;

  // ------------------------------------------------------------ MA
  logic    valid_m;
  word_t   pc_m, y_m, sd_m, ld_m, result_m;
  ctrl_t   ctrl_m;
  exc_t    exc_m;
  logic    commit_m;
  word_t   epc, status, cause, cp0_rdata;

  // ------------------------------------------------------------ WB
  logic    valid_w, we_w;
  word_t   pc_w, wd_w;
  reg_idx_t ws_w;

  // ------------------------------------------------------------ branches
  logic    br_taken_d, br_taken_e;
  word_t   br_target_d, br_target_sel;

  // ------------------------------------------------------------ control
  pc_src_t pc_src;
  logic    pc_en, d_en, ir_d_nop, ir_e_nop, kill_e, kill_wb;

  // ================================================================ IF
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .addr  (pc_f),
    .inst  (inst_f),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  // PC address exception
  assign exc_f = '{valid: (pc_f[1:0] != 2'b00), code: EXC_ADEL};

  pc_select u_pc_select (
    .pc          (pc_f),
    .pc_d        (pc_d),
    .instr_index (ir_d[25:0]),
    .rind        (rd1_d),
    .br_target   (br_target_sel),
    .handler_pc  (HANDLER_PC),
    .epc         (epc),
    .pc_src      (pc_src),
    .pc4         (pc4_f),
    .next_pc     (next_pc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc_f <= RESET_PC;
    else if (pc_en) pc_f <= next_pc;
  end

  // IRSrc_D mux and the ID pipeline register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_d    <= NOP;
      pc_d    <= '0;
      valid_d <= 1'b0;
      exc_fd  <= '0;
    end else if (d_en) begin
      if (ir_d_nop) begin
        ir_d    <= NOP;
        valid_d <= 1'b0;
        exc_fd  <= '0;
      end else begin
        ir_d    <= inst_f;
        valid_d <= 1'b1;
        exc_fd  <= exc_f;
      end
      pc_d <= pc_f;
    end
  end

  // ================================================================ ID
  decoder u_decoder (
    .ir   (ir_d),
    .ctrl (ctrl_raw)
  );

  // A bubble, or an instruction that already faulted in IF, does nothing
  // but carry its flag.
  always_comb begin
    ctrl_d = '0;
    if (valid_d) begin
      if (exc_fd.valid) ctrl_d.exc = exc_fd;
      else              ctrl_d     = ctrl_raw;
    end
  end

  regfile u_regfile (
    .clk   (clk),
    .rst_n (rst_n),
    .rs1   (ir_d[25:21]),
    .rs2   (ir_d[20:16]),
    .rd1   (rd1_d),
    .rd2   (rd2_d),
    .we    (we_w),
    .ws    (ws_w),
    .wd    (wd_w)
  );

  hazard_unit u_hazard (
    .rs_d       (ir_d[25:21]),
    .rt_d       (ir_d[20:16]),
    .re1_d      (ctrl_d.re1),
    .re2_d      (ctrl_d.re2),
    .ws_e       (ctrl_e.ws),
    .we_e       (ctrl_e.we),
    .ws_m       (ctrl_m.ws),
    .we_m       (ctrl_m.we),
    .ws_w       (ws_w),
    .we_w       (we_w),
    .br_taken_e (br_taken_e),
    .stall      (stall)
  );

  // Branch resolution, in EX (default) or in ID. In ID the branch is
  // treated like a jump: it redirects unless stalled and kills one slot.
  if (BRANCH_IN_ID) begin : g_br_id
    word_t unused_target_e;
    logic  unused_zero_d, unused_zero_e;
    branch_unit u_branch_d (
      .a       (rd1_d),
      .pc_e    (pc_d),
      .imm     (ctrl_d.imm),
      .is_beqz (ctrl_d.beqz),
      .is_bnez (ctrl_d.bnez),
      .zero    (unused_zero_d),
      .taken   (br_taken_d),
      .target  (br_target_d)
    );
    assign br_taken_e      = 1'b0;
    assign br_target_sel   = br_target_d;
    assign unused_target_e = br_target_e;
    assign unused_zero_e   = zero_e;
  end else begin : g_br_ex
    assign br_taken_d    = 1'b0;
    assign br_target_d   = '0;
    assign br_taken_e    = br_taken_ex;
    assign br_target_sel = br_target_e;
  end
  assign br_taken = br_taken_e || (br_taken_d && !stall && !exc_take && !rfe_take);

  pc_ctrl u_pc_ctrl (
    .exc_take   (exc_take),
    .rfe_take   (rfe_take),
    .br_taken_d (br_taken_d),
    .br_taken_e (br_taken_e),
    .jabs_d     (ctrl_d.jabs),
    .rind_d     (ctrl_d.rind),
    .stall      (stall),
    .pc_src     (pc_src),
    .pc_en      (pc_en),
    .d_en       (d_en),
    .ir_d_nop   (ir_d_nop),
    .ir_e_nop   (ir_e_nop),
    .kill_e     (kill_e),
    .kill_wb    (kill_wb)
  );

  assign jump_d = (ctrl_d.jabs || ctrl_d.rind) && !stall && !br_taken_e && !exc_take && !rfe_take;

  // IRSrc_E mux and the EX pipeline register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_e <= 1'b0;
      ctrl_e  <= '0;
      exc_e   <= '0;
      pc_e    <= '0;
      a_e     <= '0;
      b_e     <= '0;
    end else begin
      if (ir_e_nop) begin
        valid_e <= 1'b0;
        ctrl_e  <= '0;
        exc_e   <= '0;
      end else begin
        valid_e <= valid_d;
        ctrl_e  <= ctrl_d;
        exc_e   <= ctrl_d.exc;
      end
      pc_e <= pc_d;
      a_e  <= rd1_d;
      b_e  <= rd2_d;
    end
  end

  // ================================================================ EX
  assign alu_b = ctrl_e.b_imm ? ctrl_e.imm : b_e;

  alu u_alu (
    .op  (ctrl_e.alu_op),
    .a   (a_e),
    .b   (alu_b),
    .y   (alu_y),
    .ovf (ovf_e)
  );

  branch_unit u_branch (
    .a       (a_e),
    .pc_e    (pc_e),
    .imm     (ctrl_e.imm),
    .is_beqz (ctrl_e.beqz && !BRANCH_IN_ID),
    .is_bnez (ctrl_e.bnez && !BRANCH_IN_ID),
    .zero    (zero_e),
    .taken   (br_taken_ex),
    .target  (br_target_e)
  );

  // JAL/JALR write the return address (no delay slot: PC + 4)
  assign y_e = ctrl_e.link ? pc_e + word_t'(4) : alu_y;

  // an earlier stage's flag has priority over overflow
  always_comb begin
    exc_e_out = exc_e;
    if (!exc_e.valid && ctrl_e.trap_ovf && ovf_e) exc_e_out = '{valid: 1'b1, code: EXC_OV};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_m <= 1'b0;
      ctrl_m  <= '0;
      exc_m   <= '0;
      pc_m    <= '0;
      y_m     <= '0;
      sd_m    <= '0;
    end else begin
      if (kill_e) begin
        valid_m <= 1'b0;
        ctrl_m  <= '0;
        exc_m   <= '0;
      end else begin
        valid_m <= valid_e;
        ctrl_m  <= ctrl_e;
        exc_m   <= exc_e_out;
      end
      pc_m <= pc_e;
      y_m  <= y_e;
      sd_m <= b_e;
    end
  end

  // ================================================================ MA
  exc_unit u_exc (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_m   (valid_m),
    .pc_m      (pc_m),
    .exc_m     (exc_m),
    .load_m    (ctrl_m.load),
    .store_m   (ctrl_m.store),
    .addr_m    (y_m),
    .priv_m    (ctrl_m.priv),
    .rfe_m     (ctrl_m.rfe),
    .mtc0_m    (ctrl_m.mtc0),
    .cp0_sel   (ctrl_m.imm[4:0]),
    .cp0_wdata (sd_m),
    .irq       (irq),
    .take      (exc_take),
    .take_code (exc_cause),
    .take_epc  (exc_epc),
    .rfe_take  (rfe_take),
    .commit    (commit_m),
    .epc       (epc),
    .status    (status),
    .cause     (cause),
    .cp0_rdata (cp0_rdata)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .addr  (y_m),
    .we    (commit_m && ctrl_m.store),
    .wdata (sd_m),
    .rdata (ld_m)
  );

  always_comb begin
    if (ctrl_m.load)      result_m = ld_m;
    else if (ctrl_m.mfc0) result_m = cp0_rdata;
    else                  result_m = y_m;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_w <= 1'b0;
      we_w    <= 1'b0;
      ws_w    <= '0;
      wd_w    <= '0;
      pc_w    <= '0;
    end else begin
      if (kill_wb) begin
        valid_w <= 1'b0;
        we_w    <= 1'b0;
      end else begin
        valid_w <= valid_m;
        we_w    <= ctrl_m.we;
      end
      ws_w <= ctrl_m.ws;
      wd_w <= result_m;
      pc_w <= pc_m;
    end
  end

  // ================================================================ WB
  assign rt_valid = valid_w;
  assign rt_pc    = pc_w;
  assign rt_we    = we_w;
  assign rt_ws    = ws_w;
  assign rt_wd    = wd_w;

  // the commit point and the branch never redirect on a bubble
  a_no_bubble_take: assert property (@(posedge clk) disable iff (!rst_n) exc_take |-> valid_m);
  a_no_bubble_branch: assert property (@(posedge clk) disable iff (!rst_n) br_taken_e |-> valid_e);
endmodule
