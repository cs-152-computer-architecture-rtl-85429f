// tb_pipe5_cpu: end-to-end test of the five-stage pipeline at its default
// parameters.
//
// A reference instruction-set model, written independently of the RTL,
// executes the same program one instruction at a time. Every instruction
// the pipeline retires in WB is compared (PC, destination, value) with the
// model's next instruction, and every exception the pipeline takes at the
// commit point is compared (code, EPC) with the exception the model
// expects. Asynchronous interrupts are raised at random by a simple device
// model that holds its request line until the interrupt is taken; the model
// checks that the pipeline took it precisely, at the instruction the model
// would execute next.
//
// Programs:
//  1. a directed timing program that reproduces the pipeline diagrams:
//     back-to-back independent instructions (one per cycle), a taken BEQZ
//     (two bubbles), a J (one bubble), a read-after-write dependence
//     (three stall cycles without bypassing) and an overflowing ADD whose
//     handler is fetched the cycle after the ADD reaches MA;
//  2. several random programs built from 4-word chunks: ALU operations on a
//     few registers (frequent interlocks), loads and stores, forward
//     branches and jumps (J, JAL, JR, JALR), overflow, illegal opcodes,
//     system calls, misaligned loads, stores and fetch addresses, and a
//     final switch to user mode followed by a privileged instruction.
// The exception handler at the handler address reads Cause and EPC, steps
// EPC past a faulting instruction and returns with RFE.
// Every mechanism (stall, taken branch, jump, each exception class,
// interrupt, RFE) must occur at least once.
module tb_pipe5_cpu;
  import pipe5_pkg::*;

  localparam int unsigned IW    = 1024;     // default memory sizes
  localparam int unsigned DW    = 1024;
  localparam word_t       HPC   = 32'h100;  // default handler address
  localparam word_t       MAIN  = 32'h200;
  localparam int          NPROG = 12;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [NIRQ-1:0] irq;
  logic            imem_we;
  word_t           imem_waddr, imem_wdata;
  logic            rt_valid, rt_we, exc_take, stall, br_taken, jump_d, rfe_take;
  word_t           rt_pc, rt_wd, exc_epc;
  reg_idx_t        rt_ws;
  exc_code_t       exc_cause;

  pipe5_cpu dut (
    .clk, .rst_n, .irq, .imem_we, .imem_waddr, .imem_wdata,
    .rt_valid, .rt_pc, .rt_we, .rt_ws, .rt_wd,
    .exc_take, .exc_cause, .exc_epc,
    .stall, .br_taken, .jump_d, .rfe_take
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- encoding
  function automatic word_t enc_r(logic [5:0] fn, int rs, int rt, int rd);
    return {OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t enc_j(logic [5:0] op, word_t target);
    return {op, target[27:2]};
  endfunction
  function automatic word_t enc_c0(logic [4:0] sub, int rt, logic [4:0] rd);
    return {OP_COP0, sub, 5'(rt), rd, 11'd0};
  endfunction
  localparam word_t RFE_W = {OP_COP0, C0_CO, 15'd0, FN_RFE};

  // ---------------------------------------------------------- program image
  word_t prog [IW];
  word_t dinit [DW];

  task automatic emit(inout int a, input word_t w);
    prog[a >> 2] = w;
    a += 4;
  endtask

  // handler: r26 = Cause, r27 = EPC; skip the faulting word unless the
  // cause is an interrupt (return to EPC) or a syscall (EPC already next)
  task automatic build_common();
    int a;
    for (int i = 0; i < int'(IW); i++) prog[i] = NOP;
    a = 0;
    emit(a, enc_i(OP_ORI, 0, 22, 16'hFF01));          // IE=1, IM=ff
    emit(a, enc_c0(C0_MT, 22, CP0_STATUS));
    emit(a, enc_j(OP_J, MAIN));
    a = int'(HPC);
    emit(a, enc_c0(C0_MF, 26, CP0_CAUSE));
    emit(a, enc_c0(C0_MF, 27, CP0_EPC));
    emit(a, enc_i(OP_ANDI, 26, 26, 16'h7C));
    emit(a, enc_i(OP_BEQZ, 26, 0, 6));                 // interrupt -> ret
    emit(a, enc_i(OP_ADDI, 26, 25, -(8 << 2)));
    emit(a, enc_i(OP_BEQZ, 25, 0, 4));                 // syscall -> ret
    emit(a, enc_i(OP_ADDI, 0, 25, -4));
    emit(a, enc_r(FN_AND, 27, 25, 27));
    emit(a, enc_i(OP_ADDI, 27, 27, 4));
    emit(a, enc_c0(C0_MT, 27, CP0_EPC));
    emit(a, enc_i(OP_ADDI, 24, 24, 1));                // ret: count
    emit(a, RFE_W);
  endtask

  word_t end_pc;

  task automatic build_timing();
    int a;
    build_common();
    a = int'(MAIN);
    emit(a, enc_i(OP_ADDI, 0, 1, 10));       // 200
    emit(a, enc_i(OP_ADDI, 2, 3, 17));       // 204
    emit(a, enc_i(OP_ADDI, 0, 4, 1));        // 208
    emit(a, enc_i(OP_ADDI, 0, 5, 2));        // 20c
    emit(a, enc_i(OP_BEQZ, 0, 0, 2));        // 210 -> 21c
    emit(a, enc_i(OP_ADDI, 0, 6, 1));        // 214 killed
    emit(a, enc_i(OP_ADDI, 0, 6, 2));        // 218 killed
    emit(a, enc_i(OP_ADDI, 0, 7, 3));        // 21c
    emit(a, enc_j(OP_J, 32'h22c));           // 220
    emit(a, enc_i(OP_ADDI, 0, 8, 1));        // 224 killed
    emit(a, enc_i(OP_ADDI, 0, 8, 2));        // 228 never fetched
    emit(a, enc_i(OP_ADDI, 1, 9, 1));        // 22c
    emit(a, enc_i(OP_ADDI, 9, 10, 1));       // 230 RAW on r9
    emit(a, enc_i(OP_BNEZ, 0, 0, 5));        // 234 not taken
    emit(a, enc_i(OP_LUI, 0, 11, 16'h7FFF)); // 238
    emit(a, enc_i(OP_ADDI, 0, 12, 0));       // 23c
    emit(a, enc_i(OP_ADDI, 0, 12, 0));       // 240
    emit(a, enc_i(OP_ADDI, 0, 12, 0));       // 244
    emit(a, enc_r(FN_ADD, 11, 11, 13));      // 248 overflow
    emit(a, enc_r(FN_XOR, 1, 1, 14));        // 24c
    emit(a, enc_r(FN_SUB, 1, 1, 15));        // 250
    emit(a, enc_i(OP_ADDI, 0, 16, 5));       // 254
    end_pc = word_t'(a);
    emit(a, enc_j(OP_J, end_pc));
  endtask

  function automatic int rreg();
    return 1 + int'($urandom_range(0, 9));
  endfunction

  task automatic build_random();
    int a, nchunk, k, tgt;
    build_common();
    nchunk = (int'(IW) * 4 - int'(MAIN) - 64) / 16;
    for (int c = 0; c < nchunk; c++) begin
      a = int'(MAIN) + 16 * c;
      // default filler: independent-ish ALU operations
      for (int i = 0; i < 4; i++) begin
        case ($urandom_range(0, 7))
          0: prog[(a >> 2) + i] = enc_r(FN_ADD, rreg(), rreg(), rreg());
          1: prog[(a >> 2) + i] = enc_r(FN_SUB, rreg(), rreg(), rreg());
          2: prog[(a >> 2) + i] = enc_r(FN_XOR, rreg(), rreg(), rreg());
          3: prog[(a >> 2) + i] = enc_r(FN_SLT, rreg(), rreg(), rreg());
          4: prog[(a >> 2) + i] = enc_i(OP_ADDI, rreg(), rreg(), int'($urandom_range(0, 65535)));
          5: prog[(a >> 2) + i] = enc_i(OP_LUI, 0, rreg(), int'($urandom));
          6: prog[(a >> 2) + i] = enc_i(OP_LW, 0, rreg(), 4 * int'($urandom_range(0, 63)));
          default: prog[(a >> 2) + i] = enc_i(OP_ORI, rreg(), rreg(), int'($urandom_range(0, 65535)));
        endcase
      end
      tgt = int'(MAIN) + 16 * (c + 1 + int'($urandom_range(0, 2)));
      if (tgt > int'(MAIN) + 16 * nchunk) tgt = int'(MAIN) + 16 * nchunk;
      k = (a >> 2) + int'($urandom_range(0, 1));
      case ($urandom_range(0, 15))
        0: prog[k] = enc_i(OP_BEQZ, rreg(), 0, (tgt - (k * 4 + 4)) / 4);
        1: prog[k] = enc_i(OP_BNEZ, rreg(), 0, (tgt - (k * 4 + 4)) / 4);
        2: prog[k] = enc_j(OP_J, word_t'(tgt));
        3: prog[k] = enc_j(OP_JAL, word_t'(tgt));
        4: begin
          prog[k]     = enc_i(OP_ORI, 0, 20, tgt);
          prog[k + 1] = enc_r(FN_JR, 20, 0, 0);
        end
        5: begin
          prog[k]     = enc_i(OP_ORI, 0, 20, tgt);
          prog[k + 1] = enc_r(FN_JALR, 20, 0, 21);
        end
        6: prog[k] = enc_i(OP_SW, 0, rreg(), 4 * int'($urandom_range(0, 63)));
        7: prog[k] = enc_i(OP_SW, 0, rreg(), 4 * int'($urandom_range(0, 63)) + 2);
        8: prog[k] = enc_i(OP_LW, 0, rreg(), 4 * int'($urandom_range(0, 63)) + 1);
        9: prog[k] = {6'h3F, 26'(int'($urandom))};                // illegal
        10: prog[k] = enc_r(FN_SYSCALL, 0, 0, 0);
        11: begin                                                  // overflow
          prog[k]     = enc_i(OP_LUI, 0, 19, 16'h7000 + int'($urandom_range(0, 4095)));
          prog[k + 1] = enc_r(FN_ADD, 19, 19, rreg());
        end
        12: begin                                                  // bad fetch
          // the handler resumes at the next word boundary, i.e. at tgt
          prog[k]     = enc_i(OP_ORI, 0, 20, tgt - 4 + int'($urandom_range(1, 3)));
          prog[k + 1] = enc_r(FN_JR, 20, 0, 0);
        end
        13: prog[k] = enc_c0(C0_MF, rreg(), CP0_STATUS);
        default: ;
      endcase
    end
    // last chunks: enter user mode, then a privileged instruction, then halt
    a = int'(MAIN) + 16 * nchunk;
    emit(a, enc_i(OP_ORI, 0, 22, 16'hFF03));   // IE=1, UM=1, IM=ff
    emit(a, enc_c0(C0_MT, 22, CP0_STATUS));
    emit(a, enc_c0(C0_MF, 23, CP0_STATUS));    // privileged in user mode
    emit(a, enc_i(OP_ADDI, 0, 18, 7));
    end_pc = word_t'(a);
    emit(a, enc_j(OP_J, end_pc));
  endtask

  // ---------------------------------------------------------- reference model
  word_t m_r [32];
  word_t m_dm [DW];
  word_t m_pc, m_status, m_cause, m_epc;

  task automatic model_reset();
    for (int i = 0; i < 32; i++) m_r[i] = '0;
    for (int i = 0; i < int'(DW); i++) m_dm[i] = dinit[i];
    m_pc = '0; m_status = '0; m_cause = '0; m_epc = '0;
  endtask

  logic [NIRQ-1:0] cur_pend;   // masked request lines when an exception is taken

  task automatic model_enter(input int code, input word_t epc_v, input logic [NIRQ-1:0] pend);
    int id;
    id = 0;
    for (int i = int'(NIRQ) - 1; i >= 0; i--) if (pend[i]) id = i;
    m_epc    = epc_v;
    m_cause  = (word_t'(id) << 16) | (word_t'(pend) << 8) | (word_t'(code) << 2);
    m_status = (m_status & ~word_t'(15)) | ((m_status & 3) << 2);
    m_pc     = HPC;
  endtask

  // execute one instruction; returns exception code or -1 and the GPR write
  task automatic model_exec(output int exc, output bit we, output int ws, output word_t wd,
                            output word_t pc_out);
    word_t ins, a, b, r, nxt, imm_s, imm_z, addr;
    int op, fn, rs, rt, rd, sub;
    bit user;
    longint s;
    exc = -1; we = 0; ws = 0; wd = '0;
    pc_out = m_pc;
    nxt = m_pc + 4;
    user = m_status[1];
    if (m_pc[1:0] != 0) begin
      model_enter(4, m_pc, cur_pend);
      exc = 4;
      return;
    end
    ins = prog[m_pc[11:2]];
    op = int'(ins[31:26]); fn = int'(ins[5:0]);
    rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a = m_r[rs]; b = m_r[rt];
    imm_s = word_t'($signed(ins[15:0]));
    imm_z = {16'h0, ins[15:0]};
    case (op)
      0: begin
        if (ins == 0) ;
        else case (fn)
          'h20: begin
            s = longint'($signed(a)) + longint'($signed(b));
            if (s > 64'sh7FFFFFFF || s < -64'sh80000000) exc = 12;
            else begin we = 1; ws = rd; wd = a + b; end
          end
          'h22: begin
            s = longint'($signed(a)) - longint'($signed(b));
            if (s > 64'sh7FFFFFFF || s < -64'sh80000000) exc = 12;
            else begin we = 1; ws = rd; wd = a - b; end
          end
          'h24: begin we = 1; ws = rd; wd = a & b; end
          'h25: begin we = 1; ws = rd; wd = a | b; end
          'h26: begin we = 1; ws = rd; wd = a ^ b; end
          'h2A: begin we = 1; ws = rd; wd = ($signed(a) < $signed(b)) ? 1 : 0; end
          'h08: nxt = a;
          'h09: begin nxt = a; we = 1; ws = rd; wd = m_pc + 4; end
          'h0C: exc = 8;
          default: exc = 10;
        endcase
      end
      'h02: nxt = {nxt[31:28], ins[25:0], 2'b00};
      'h03: begin nxt = {nxt[31:28], ins[25:0], 2'b00}; we = 1; ws = 31; wd = m_pc + 4; end
      'h04: if (a == 0) nxt = m_pc + 4 + (imm_s << 2);
      'h05: if (a != 0) nxt = m_pc + 4 + (imm_s << 2);
      'h08: begin
        s = longint'($signed(a)) + longint'($signed(imm_s));
        if (s > 64'sh7FFFFFFF || s < -64'sh80000000) exc = 12;
        else begin we = 1; ws = rt; wd = a + imm_s; end
      end
      'h0A: begin we = 1; ws = rt; wd = ($signed(a) < $signed(imm_s)) ? 1 : 0; end
      'h0C: begin we = 1; ws = rt; wd = a & imm_z; end
      'h0D: begin we = 1; ws = rt; wd = a | imm_z; end
      'h0E: begin we = 1; ws = rt; wd = a ^ imm_z; end
      'h0F: begin we = 1; ws = rt; wd = {ins[15:0], 16'h0}; end
      'h23: begin
        addr = a + imm_s;
        if (addr[1:0] != 0) exc = 4;
        else begin we = 1; ws = rt; wd = m_dm[addr[11:2]]; end
      end
      'h2B: begin
        addr = a + imm_s;
        if (addr[1:0] != 0) exc = 5;
        else m_dm[addr[11:2]] = b;
      end
      'h10: begin
        sub = rs;
        if (sub == 0) begin
          if (user) exc = 11;
          else begin
            we = 1; ws = rt;
            wd = (rd == 12) ? m_status : (rd == 13) ? m_cause : (rd == 14) ? m_epc : 0;
          end
        end else if (sub == 4) begin
          if (user) exc = 11;
          else if (rd == 12) m_status = (b & 32'hFF0F);
          else if (rd == 14) m_epc = b;
        end else if (sub == 'h10 && fn == 'h10) begin
          if (user) exc = 11;
          else begin
            m_status = (m_status & ~word_t'(3)) | ((m_status >> 2) & 3);
            nxt = m_epc;
          end
        end else exc = 10;
      end
      default: exc = 10;
    endcase
    if (exc >= 0) begin
      we = 0;
      model_enter(exc, (exc == 8) ? m_pc + 4 : m_pc, cur_pend);
      return;
    end
    if (ws == 0) we = 0;
    if (we) m_r[ws] = wd;
    m_pc = nxt;
  endtask

  // ---------------------------------------------------------- checking
  int n_stall, n_br, n_jump, n_rfe, n_int, n_retire;
  int n_exc [32];
  int n_adel_fetch, n_adel_load;
  bit running = 0;
  word_t end_count;
  int rt_cycle [word_t];
  int exc_cycle_ov;
  int hnd_first_cycle;

  always @(negedge clk) begin
    int e, ws;
    bit we;
    word_t wd, pc;
    if (running && rst_n) begin
      if (stall) n_stall++;
      if (br_taken) n_br++;
      if (jump_d) n_jump++;
      if (rfe_take) n_rfe++;
      if (rt_valid) begin
        n_retire++;
        if (!rt_cycle.exists(rt_pc)) rt_cycle[rt_pc] = cycle;
        if (rt_pc == HPC && hnd_first_cycle < 0) hnd_first_cycle = cycle;
        cur_pend = '0;
        model_exec(e, we, ws, wd, pc);
        check(e < 0, $sformatf("pipeline retired pc %h where model raises exception %0d", rt_pc, e));
        check(rt_pc == pc, $sformatf("retire pc %h, model %h", rt_pc, pc));
        check(rt_we == we, $sformatf("retire pc %h we %0b, model %0b", rt_pc, rt_we, we));
        if (we) check(rt_ws == reg_idx_t'(ws) && rt_wd == wd,
                      $sformatf("retire pc %h r%0d=%h, model r%0d=%h", rt_pc, rt_ws, rt_wd, ws, wd));
        if (rt_pc == end_pc) end_count++;
      end
      if (exc_take) begin
        n_exc[exc_cause]++;
        if (exc_cause == EXC_INT) begin
          n_int++;
          check(m_pc == exc_epc, $sformatf("interrupt EPC %h, model next pc %h", exc_epc, m_pc));
          check(m_status[0] == 1'b1, "interrupt taken while disabled");
          model_enter(0, m_pc, irq & m_status[15:8]);
          irq_ack = 1'b1;                              // device acknowledged
        end else begin
          if (exc_cause == EXC_OV && exc_cycle_ov < 0) exc_cycle_ov = cycle;
          if (exc_cause == EXC_ADEL) begin
            if (exc_epc[1:0] != 0) n_adel_fetch++; else n_adel_load++;
          end
          cur_pend = irq & m_status[15:8];
          model_exec(e, we, ws, wd, pc);
          check(e == int'(exc_cause), $sformatf("exception %0d at %h, model %0d at %h",
                                                exc_cause, exc_epc, e, pc));
          check(m_epc == exc_epc, $sformatf("EPC %h, model %h", exc_epc, m_epc));
        end
      end
    end
  end

  // interrupt device: raise a random line now and then, hold until taken
  bit irq_on;
  bit irq_ack = 1'b0;
  always @(posedge clk) begin
    if (irq_ack) begin
      irq     <= '0;
      irq_ack <= 1'b0;
    end else if (irq_on && irq == '0 && $urandom_range(0, 149) == 0)
      irq <= NIRQ'(1) << $urandom_range(0, NIRQ - 1);
  end

  task automatic run_program(input bit with_irq, input int max_cycles);
    int t;
    rst_n = 1'b0; irq = '0; irq_on = 1'b0; running = 1'b0;
    imem_we = 1'b0;
    for (int i = 0; i < int'(DW); i++) begin
      dinit[i] = $urandom;
      dut.u_dmem.mem[i] = dinit[i];
    end
    repeat (2) @(posedge clk);
    // load the program through the load port while in reset
    for (int i = 0; i < int'(IW); i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = word_t'(i * 4); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    model_reset();
    end_count = 0;
    rt_cycle.delete();
    exc_cycle_ov = -1;
    hnd_first_cycle = -1;
    running = 1'b1;
    irq_on = with_irq;
    rst_n = 1'b1;
    t = 0;
    while (end_count < 3 && t < max_cycles) begin
      @(posedge clk);
      t++;
    end
    check(end_count >= 3, "program did not reach its end");
    irq_on = 1'b0;
    @(negedge clk);
    running = 1'b0;
    // final architectural state
    for (int i = 1; i < 32; i++)
      check(dut.u_regfile.regs[i] == m_r[i], $sformatf("final r%0d", i));
    for (int i = 0; i < 64; i++)
      check(dut.u_dmem.mem[i] == m_dm[i], $sformatf("final mem[%0d]", i));
  endtask

  function automatic int gap(word_t p1, word_t p2);
    if (!rt_cycle.exists(p1) || !rt_cycle.exists(p2)) return -1;
    return rt_cycle[p2] - rt_cycle[p1];
  endfunction

  initial begin
    rst_n = 1'b0;
    irq = '0;
    imem_we = 1'b0;
    n_stall = 0; n_br = 0; n_jump = 0; n_rfe = 0; n_int = 0; n_retire = 0;
    n_adel_fetch = 0; n_adel_load = 0;
    foreach (n_exc[i]) n_exc[i] = 0;

    // 1. timing program (no interrupts)
    build_timing();
    run_program(1'b0, 2000);
    check(gap(32'h200, 32'h204) == 1 && gap(32'h204, 32'h208) == 1 && gap(32'h208, 32'h20c) == 1,
          "independent instructions not one per cycle");
    check(gap(32'h210, 32'h21c) == 3, $sformatf("taken BEQZ gap %0d, expected 3", gap(32'h210, 32'h21c)));
    check(!rt_cycle.exists(32'h214) && !rt_cycle.exists(32'h218), "instructions behind taken branch retired");
    check(gap(32'h220, 32'h22c) == 2, $sformatf("J gap %0d, expected 2", gap(32'h220, 32'h22c)));
    check(!rt_cycle.exists(32'h224), "instruction behind J retired");
    check(gap(32'h22c, 32'h230) == 4, $sformatf("RAW gap %0d, expected 4", gap(32'h22c, 32'h230)));
    check(gap(32'h230, 32'h234) == 1, "not-taken BNEZ delayed");
    check(!rt_cycle.exists(32'h248), "overflowing ADD retired");
    check(hnd_first_cycle - exc_cycle_ov == 5,
          $sformatf("handler first retire %0d cycles after overflow in MA, expected 5",
                    hnd_first_cycle - exc_cycle_ov));
    check(gap(32'h248 + 4, 32'h250) == 1, "return after overflow");
    check(m_r[13] == 0, "overflowing ADD wrote its destination");

    // 2. random programs with interrupts
    for (int p = 0; p < NPROG; p++) begin
      build_random();
      run_program(1'b1, 30000);
    end

    // mechanisms
    check(n_stall > 0, "no interlock stall");
    check(n_br > 0, "no taken branch");
    check(n_jump > 0, "no jump");
    check(n_rfe > 0, "no RFE");
    check(n_int > 0, "no interrupt");
    check(n_exc[EXC_OV] > 0, "no overflow exception");
    check(n_exc[EXC_RI] > 0, "no illegal opcode exception");
    check(n_exc[EXC_SYS] > 0, "no system call");
    check(n_exc[EXC_ADES] > 0, "no store address exception");
    check(n_adel_load > 0, "no load address exception");
    check(n_adel_fetch > 0, "no fetch address exception");
    check(n_exc[EXC_CPU] > 0, "no privileged-instruction exception");
    $display("mechanisms: retired=%0d stall=%0d br_taken=%0d jump=%0d rfe=%0d int=%0d ov=%0d ri=%0d sys=%0d ades=%0d adel_load=%0d adel_fetch=%0d cpu=%0d",
             n_retire, n_stall, n_br, n_jump, n_rfe, n_int, n_exc[EXC_OV], n_exc[EXC_RI],
             n_exc[EXC_SYS], n_exc[EXC_ADES], n_adel_load, n_adel_fetch, n_exc[EXC_CPU]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
