// tb_pipe5_diagrams: replays the pipeline diagrams of the design at their
// printed addresses and checks, cycle by cycle, which instruction (by PC)
// occupies each of the five stages, or that the stage holds a bubble.
//
//  * straight-line code, 096..108: one instruction enters per cycle, no
//    bubbles;
//  * taken branch, "096 ADD, 100 BEQZ +200, 104 ADD, 108, 304 ADD": the
//    branch resolves in EX at t3, the instructions at 104 and 108 become
//    bubbles and 304 is fetched at t4;
//  * overflow, "096 ADD (overflows), 100 XOR, 104 SUB, 108 ADD": the ADD
//    reaches MA at t3, every stage including WB holds a bubble at t4, and
//    the handler's first instruction is fetched at t4.
// t0 is the cycle in which the PC first holds 096. The default design
// parameters are used (handler at 0x100, reset PC 0).
module tb_pipe5_diagrams;
  import pipe5_pkg::*;

  localparam int BUB = -2;   // bubble expected
  localparam int ANY = -1;   // not checked
  localparam int HND = 256;

  logic            clk = 1'b0, rst_n;
  logic [NIRQ-1:0] irq = '0;
  logic            imem_we;
  word_t           imem_waddr, imem_wdata;
  logic            rt_valid, rt_we, exc_take, stall, br_taken, jump_d, rfe_take;
  word_t           rt_pc, rt_wd, exc_epc;
  reg_idx_t        rt_ws;
  exc_code_t       exc_cause;

  pipe5_cpu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t prog [1024];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t enc_r(logic [5:0] fn, int rs, int rt, int rd);
    return {OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // common prologue: r1 = 0x7fffffff, r2 = 5, then jump to 096
  task automatic prologue();
    for (int i = 0; i < 1024; i++) prog[i] = NOP;
    prog[0] = enc_i(OP_LUI, 0, 1, 32'h7FFF);
    prog[1] = enc_i(OP_ORI, 1, 1, 32'hFFFF);
    prog[2] = enc_i(OP_ADDI, 0, 2, 5);
    prog[5] = {OP_J, 26'(96 >> 2)};
    for (int i = HND / 4; i < HND / 4 + 8; i++) prog[i] = enc_i(OP_ADDI, 0, 20, i);
  endtask

  // stage occupancy: PC of the valid instruction, or BUB
  function automatic int occ(input int stage);
    case (stage)
      0: return int'(dut.pc_f);
      1: return dut.valid_d ? int'(dut.pc_d) : BUB;
      2: return dut.valid_e ? int'(dut.pc_e) : BUB;
      3: return dut.valid_m ? int'(dut.pc_m) : BUB;
      default: return dut.valid_w ? int'(dut.pc_w) : BUB;
    endcase
  endfunction

  task automatic run(input string name, input int exp [9][5]);
    string sn [5] = '{"IF", "ID", "EX", "MA", "WB"};
    rst_n = 1'b0;
    imem_we = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = word_t'(i * 4); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    rst_n = 1'b1;
    while (dut.pc_f != 96) @(negedge clk);
    for (int t = 0; t < 9; t++) begin
      for (int s = 0; s < 5; s++) begin
        if (exp[t][s] != ANY) begin
          checks++;
          if (occ(s) != exp[t][s]) begin
            failures++;
            $display("FAIL %s t%0d %s: %0d expected %0d", name, t, sn[s], occ(s), exp[t][s]);
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int straight [9][5];
    int branch [9][5];
    int ovf [9][5];

    // straight-line code
    prologue();
    for (int i = 0; i < 8; i++) prog[24 + i] = enc_i(OP_ADDI, 0, 3 + i, i);
    straight = '{
      '{ 96, ANY, ANY, ANY, ANY},
      '{100,  96, ANY, ANY, ANY},
      '{104, 100,  96, ANY, ANY},
      '{108, 104, 100,  96, ANY},
      '{112, 108, 104, 100,  96},
      '{116, 112, 108, 104, 100},
      '{120, 116, 112, 108, 104},
      '{124, 120, 116, 112, 108},
      '{ANY, 124, 120, 116, 112}};
    run("straight", straight);

    // taken branch: 100: BEQZ r0, +200 -> 304
    prologue();
    prog[24] = enc_r(FN_ADD, 2, 2, 3);          // 096 ADD
    prog[25] = enc_i(OP_BEQZ, 0, 0, 200 / 4);   // 100 BEQZ +200
    prog[26] = enc_r(FN_ADD, 2, 2, 4);          // 104 ADD
    prog[27] = enc_r(FN_ADD, 2, 2, 5);          // 108
    prog[76] = enc_r(FN_ADD, 2, 2, 6);          // 304 ADD
    prog[77] = enc_r(FN_ADD, 2, 2, 7);
    prog[78] = enc_r(FN_ADD, 2, 2, 8);
    branch = '{
      '{ 96, ANY, ANY, ANY, ANY},
      '{100,  96, ANY, ANY, ANY},
      '{104, 100,  96, ANY, ANY},
      '{108, 104, 100,  96, ANY},
      '{304, BUB, BUB, 100,  96},
      '{308, 304, BUB, BUB, 100},
      '{312, 308, 304, BUB, BUB},
      '{ANY, 312, 308, 304, BUB},
      '{ANY, ANY, 312, 308, 304}};
    run("branch", branch);

    // overflow in the ADD at 096: handler fetched at t4
    prologue();
    prog[24] = enc_r(FN_ADD, 1, 1, 3);          // 096 ADD overflows
    prog[25] = enc_r(FN_XOR, 2, 2, 4);          // 100 XOR
    prog[26] = enc_r(FN_SUB, 2, 2, 5);          // 104 SUB
    prog[27] = enc_r(FN_ADD, 2, 2, 6);          // 108 ADD
    ovf = '{
      '{ 96, ANY, ANY, ANY, ANY},
      '{100,  96, ANY, ANY, ANY},
      '{104, 100,  96, ANY, ANY},
      '{108, 104, 100,  96, ANY},
      '{HND, BUB, BUB, BUB, BUB},
      '{HND + 4, HND, BUB, BUB, BUB},
      '{HND + 8, HND + 4, HND, BUB, BUB},
      '{ANY, HND + 8, HND + 4, HND, BUB},
      '{ANY, ANY, HND + 8, HND + 4, HND}};
    run("overflow", ovf);
    checks++;
    if (dut.u_exc.epc != 96 || dut.u_exc.cause[6:2] != 5'(EXC_OV)) begin
      failures++;
      $display("FAIL overflow: EPC %0d cause %h", dut.u_exc.epc, dut.u_exc.cause);
    end
    checks++;
    if (dut.u_regfile.regs[3] != 0) begin
      failures++;
      $display("FAIL overflow: destination written");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
