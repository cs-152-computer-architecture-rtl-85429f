// tb_pc_select: random PCs and targets through every PCSrc choice; the
// jump target is formed here from PC_D + 4 and the 26-bit index.
module tb_pc_select;
  import pipe5_pkg::*;
  word_t       pc, pc_d, rind, br_target, handler_pc, epc, pc4, next_pc;
  logic [25:0] instr_index;
  pc_src_t     pc_src;
  int checks = 0, failures = 0;

  pc_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      word_t exp_n;
      longint pd4;
      pc = $urandom & ~32'h3; pc_d = $urandom & ~32'h3;
      rind = $urandom; br_target = $urandom; handler_pc = $urandom; epc = $urandom;
      instr_index = 26'($urandom);
      pc_src = pc_src_t'($urandom_range(0, 5));
      #1;
      pd4 = longint'(pc_d) + 4;
      case (pc_src)
        PC_JABS: exp_n = (word_t'(pd4) & 32'hF000_0000) | (word_t'(instr_index) * 4);
        PC_RIND: exp_n = rind;
        PC_BR:   exp_n = br_target;
        PC_HND:  exp_n = handler_pc;
        PC_EPC:  exp_n = epc;
        default: exp_n = word_t'(longint'(pc) + 4);
      endcase
      checks++;
      if (next_pc !== exp_n || pc4 !== word_t'(longint'(pc) + 4)) begin
        failures++;
        if (failures < 10) $display("FAIL src %s: next %h expected %h", pc_src.name(), next_pc, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
