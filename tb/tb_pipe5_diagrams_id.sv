// tb_pipe5_diagrams_id: stage-occupancy check of the branch-in-ID option
// (BRANCH_IN_ID = 1), at the same addresses as tb_pipe5_diagrams.
//
//  * taken branch, "096 ADD, 100 BEQZ +200, 104 ADD, 304 ADD": the branch
//    is resolved in ID at t2 by the zero test on the register-file output,
//    only the instruction at 104 becomes a bubble and 304 is fetched at t3;
//  * the same sequence with "100 J 304" in place of the branch must give
//    exactly the same diagram: with the extra comparator in ID a taken
//    branch costs what a jump costs;
//  * a not-taken BNEZ at 100 costs nothing.
// t0 is the cycle in which the PC first holds 096. All other parameters
// are at their defaults (handler at 0x100, reset PC 0). The occupancy is
// read hierarchically from the stage registers and their valid bits.
module tb_pipe5_diagrams_id;
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

  pipe5_cpu #(.BRANCH_IN_ID(1'b1)) dut (.*);
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
    int branch [9][5];
    int fall [9][5];

    branch = '{
      '{ 96, ANY, ANY, ANY, ANY},
      '{100,  96, ANY, ANY, ANY},
      '{104, 100,  96, ANY, ANY},
      '{304, BUB, 100,  96, ANY},
      '{308, 304, BUB, 100,  96},
      '{312, 308, 304, BUB, 100},
      '{ANY, 312, 308, 304, BUB},
      '{ANY, ANY, 312, 308, 304},
      '{ANY, ANY, ANY, 312, 308}};

    // taken BEQZ r0, +200 resolved in ID
    prologue();
    prog[24] = enc_r(FN_ADD, 2, 2, 3);          // 096 ADD
    prog[25] = enc_i(OP_BEQZ, 0, 0, 200 / 4);   // 100 BEQZ +200
    prog[26] = enc_r(FN_ADD, 2, 2, 4);          // 104 ADD
    for (int i = 0; i < 3; i++) prog[76 + i] = enc_r(FN_ADD, 2, 2, 6 + i);
    run("branch", branch);
    checks++;
    if (dut.u_regfile.regs[4] != 0) begin
      failures++;
      $display("FAIL branch: killed instruction at 104 wrote r4");
    end

    // J 304 in place of the branch: same diagram
    prologue();
    prog[24] = enc_r(FN_ADD, 2, 2, 3);
    prog[25] = {OP_J, 26'(304 >> 2)};
    prog[26] = enc_r(FN_ADD, 2, 2, 4);
    for (int i = 0; i < 3; i++) prog[76 + i] = enc_r(FN_ADD, 2, 2, 6 + i);
    run("jump", branch);

    // not-taken BNEZ r0: straight-line timing
    prologue();
    prog[24] = enc_r(FN_ADD, 2, 2, 3);
    prog[25] = enc_i(OP_BNEZ, 0, 0, 200 / 4);
    for (int i = 26; i < 32; i++) prog[i] = enc_r(FN_ADD, 2, 2, i - 20);
    fall = '{
      '{ 96, ANY, ANY, ANY, ANY},
      '{100,  96, ANY, ANY, ANY},
      '{104, 100,  96, ANY, ANY},
      '{108, 104, 100,  96, ANY},
      '{112, 108, 104, 100,  96},
      '{116, 112, 108, 104, 100},
      '{120, 116, 112, 108, 104},
      '{124, 120, 116, 112, 108},
      '{ANY, 124, 120, 116, 112}};
    run("not taken", fall);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
