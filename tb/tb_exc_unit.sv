// tb_exc_unit: directed commit-point scenarios. Each step presents one
// instruction in MA, checks the same-cycle decision (take, code, EPC to be
// written, RFE, commit), clocks, and then reads Status, Cause and EPC back
// through the MFC0 read port. Covered: MTC0 of Status and EPC, an
// illegal-opcode flag, interrupt priority over a carried flag, interrupts
// ignored on a bubble or while disabled, RFE restoring IE/UM, a privileged
// instruction in user mode, misaligned load and store, an earlier flag
// winning over an address error, and the system-call EPC.
// A random phase then drives 20000 cycles of random MA contents and
// interrupt lines against a reference model of the three registers kept in
// the testbench, checking every decision output and all three registers
// (via the read port) each cycle.
module tb_exc_unit;
  import pipe5_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      valid_m, load_m, store_m, priv_m, rfe_m, mtc0_m;
  word_t     pc_m, addr_m, cp0_wdata;
  exc_t      exc_m;
  reg_idx_t  cp0_sel;
  logic [7:0] irq;
  logic      take, rfe_take, commit;
  exc_code_t take_code;
  word_t     take_epc, epc, status, cause, cp0_rdata;
  int checks = 0, failures = 0;

  exc_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    valid_m = 0; load_m = 0; store_m = 0; priv_m = 0; rfe_m = 0; mtc0_m = 0;
    exc_m = '0; pc_m = 0; addr_m = 0; cp0_wdata = 0; cp0_sel = 0;
  endtask

  // present an instruction, check the decision, clock
  task automatic step(input bit e_take, input int e_code, input word_t e_epc, input bit e_rfe);
    #1;
    check(take == e_take, $sformatf("take %b expected %b (pc %h)", take, e_take, pc_m));
    if (e_take) begin
      check(take_code == exc_code_t'(e_code), $sformatf("code %0d expected %0d", take_code, e_code));
      check(take_epc == e_epc, $sformatf("epc %h expected %h", take_epc, e_epc));
    end
    check(rfe_take == e_rfe, "rfe_take");
    check(commit == (valid_m && !e_take), "commit");
    @(posedge clk);
    #1;
    idle();
  endtask

  task automatic rd_check(input reg_idx_t r, input word_t expv, input string what);
    cp0_sel = r;
    #1;
    check(cp0_rdata == expv, $sformatf("%s = %h expected %h", what, cp0_rdata, expv));
  endtask


  // reference model of Status/Cause/EPC for the random phase
  word_t m_status, m_cause, m_epc;

  task automatic rand_phase(input int n);
    exc_code_t codes [6] = '{EXC_ADEL, EXC_SYS, EXC_RI, EXC_OV, EXC_RI, EXC_OV};
    reg_idx_t  sels [4] = '{CP0_STATUS, CP0_CAUSE, CP0_EPC, 5'd3};
    m_status = status; m_cause = cause; m_epc = epc;
    for (int i = 0; i < n; i++) begin
      logic [7:0] pend;
      bit e_take, e_rfe;
      exc_code_t e_code;
      word_t e_epc, e_rd;
      int line;
      idle();
      valid_m = ($urandom_range(0, 7) != 0);
      pc_m    = {$urandom, 2'b00};
      irq     = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'h0;
      if ($urandom_range(0, 5) == 0) exc_m = '{1'b1, codes[$urandom_range(0, 5)]};
      case ($urandom_range(0, 6))
        0: begin load_m = 1; addr_m = $urandom; end
        1: begin store_m = 1; addr_m = $urandom; end
        2: begin priv_m = 1; rfe_m = 1; end
        3, 4: begin priv_m = 1; mtc0_m = 1; cp0_wdata = $urandom;
             if ($urandom_range(0, 1) != 0) cp0_wdata[1] = 1'b0; end  // stay in kernel mode more often
        default: ;
      endcase
      cp0_sel = sels[$urandom_range(0, 3)];
      // expected decision
      pend  = irq & m_status[15:8];
      line  = 0;
      for (int k = 7; k >= 0; k--) if (pend[k]) line = k;
      e_take = 1'b1;
      if (!valid_m)                                 e_take = 1'b0;
      else if (m_status[0] && pend != 0)           e_code = EXC_INT;
      else if (exc_m.valid)                         e_code = exc_m.code;
      else if (priv_m && m_status[1])               e_code = EXC_CPU;
      else if ((load_m || store_m) && addr_m[1:0] != 0) e_code = store_m ? EXC_ADES : EXC_ADEL;
      else                                          e_take = 1'b0;
      e_epc = (e_code == EXC_SYS) ? pc_m + 4 : pc_m;
      e_rfe = valid_m && !e_take && rfe_m;
      e_rd  = (cp0_sel == CP0_STATUS) ? m_status : (cp0_sel == CP0_CAUSE) ? m_cause :
              (cp0_sel == CP0_EPC) ? m_epc : 32'h0;
      #1;
      check(take == e_take, $sformatf("random %0d: take %b expected %b", i, take, e_take));
      if (e_take) begin
        check(take_code == e_code, $sformatf("random %0d: code %0d expected %0d", i, take_code, e_code));
        check(take_epc == e_epc, $sformatf("random %0d: epc %h expected %h", i, take_epc, e_epc));
      end
      check(rfe_take == e_rfe, $sformatf("random %0d: rfe_take", i));
      check(commit == (valid_m && !e_take), $sformatf("random %0d: commit", i));
      check(cp0_rdata == e_rd, $sformatf("random %0d: cp0 reg %0d = %h expected %h", i, cp0_sel, cp0_rdata, e_rd));
      // expected register update at the edge
      if (e_take) begin
        m_epc   = e_epc;
        m_cause = {13'h0, 3'(line), pend, 1'b0, e_code, 2'b00};
        m_status[3:0] = {m_status[1], m_status[0], 2'b00};
      end else if (e_rfe) begin
        m_status[1:0] = m_status[3:2];
      end else if (valid_m && mtc0_m && cp0_sel == CP0_STATUS) begin
        m_status = cp0_wdata & 32'h0000_FF0F;
      end else if (valid_m && mtc0_m && cp0_sel == CP0_EPC) begin
        m_epc = cp0_wdata;
      end
      @(posedge clk);
      #1;
    end
    idle();
    rd_check(CP0_STATUS, m_status, "status after random phase");
    rd_check(CP0_CAUSE, m_cause, "cause after random phase");
    rd_check(CP0_EPC, m_epc, "epc after random phase");
  endtask

  initial begin
    idle();
    irq = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    rd_check(CP0_STATUS, 0, "status after reset");
    // MTC0 Status = IE, IM=ff (kernel)
    valid_m = 1; pc_m = 32'h40; mtc0_m = 1; priv_m = 1; cp0_sel = CP0_STATUS; cp0_wdata = 32'hFF01;
    step(0, 0, 0, 0);
    rd_check(CP0_STATUS, 32'hFF01, "status after mtc0");
    // illegal opcode flagged in ID
    valid_m = 1; pc_m = 32'h44; exc_m = '{valid: 1, code: EXC_RI};
    step(1, 10, 32'h44, 0);
    rd_check(CP0_EPC, 32'h44, "epc");
    rd_check(CP0_CAUSE, 32'd10 << 2, "cause");
    rd_check(CP0_STATUS, 32'hFF04, "status after exception (IE saved, kernel)");
    // interrupts disabled now: a request is ignored
    irq = 8'h10; valid_m = 1; pc_m = 32'h100;
    step(0, 0, 0, 0);
    // RFE restores IE
    valid_m = 1; pc_m = 32'h104; rfe_m = 1; priv_m = 1;
    step(0, 0, 0, 1);
    rd_check(CP0_STATUS, 32'hFF05, "status after rfe");
    // a bubble in MA does not take the interrupt
    valid_m = 0;
    step(0, 0, 0, 0);
    // interrupt overrides a carried overflow flag; line 4 and 6 pending -> id 4
    irq = 8'h50; valid_m = 1; pc_m = 32'h48; exc_m = '{valid: 1, code: EXC_OV};
    step(1, 0, 32'h48, 0);
    rd_check(CP0_CAUSE, (32'd4 << 16) | (32'h50 << 8), "cause of interrupt");
    rd_check(CP0_EPC, 32'h48, "epc of interrupt");
    irq = 0;
    // MTC0 EPC, then RFE back to user mode with interrupts on: status 0xFF0F
    valid_m = 1; pc_m = 32'h108; mtc0_m = 1; priv_m = 1; cp0_sel = CP0_STATUS; cp0_wdata = 32'hFF0C;
    step(0, 0, 0, 0);
    valid_m = 1; pc_m = 32'h10c; mtc0_m = 1; priv_m = 1; cp0_sel = CP0_EPC; cp0_wdata = 32'h200;
    step(0, 0, 0, 0);
    rd_check(CP0_EPC, 32'h200, "epc after mtc0");
    valid_m = 1; pc_m = 32'h110; rfe_m = 1; priv_m = 1;
    step(0, 0, 0, 1);
    rd_check(CP0_STATUS, 32'hFF0F, "status in user mode");
    // privileged instruction in user mode
    valid_m = 1; pc_m = 32'h200; rfe_m = 1; priv_m = 1;
    step(1, 11, 32'h200, 0);
    rd_check(CP0_STATUS, 32'hFF0C, "status after CpU exception");
    // misaligned load and store, aligned access commits
    valid_m = 1; pc_m = 32'h204; load_m = 1; addr_m = 32'h1002;
    step(1, 4, 32'h204, 0);
    valid_m = 1; pc_m = 32'h208; store_m = 1; addr_m = 32'h1001;
    step(1, 5, 32'h208, 0);
    valid_m = 1; pc_m = 32'h20c; store_m = 1; addr_m = 32'h1000;
    step(0, 0, 0, 0);
    // earlier flag (overflow) wins over a bad address of the same instruction
    valid_m = 1; pc_m = 32'h210; load_m = 1; addr_m = 32'h3; exc_m = '{valid: 1, code: EXC_OV};
    step(1, 12, 32'h210, 0);
    // system call: EPC is the next instruction
    valid_m = 1; pc_m = 32'h214; exc_m = '{valid: 1, code: EXC_SYS};
    step(1, 8, 32'h218, 0);
    rd_check(CP0_EPC, 32'h218, "syscall epc");
    rand_phase(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
