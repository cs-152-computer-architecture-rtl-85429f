// tb_branch_unit: the diagram's example ("100: BEQZ +200" goes to 304),
// then random operands, offsets and branch kinds against the rule
// taken = BEQZ.z + BNEZ.!z and target = PC + 4 + 4 * offset.
module tb_branch_unit;
  import pipe5_pkg::*;
  word_t a, pc_e, imm, target;
  logic  is_beqz, is_bnez, zero, taken;
  int checks = 0, failures = 0;

  branch_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; pc_e = 32'd100; imm = 32'd50; is_beqz = 1; is_bnez = 0;
    #1;
    checks++;
    if (!taken || target != 32'd304) begin failures++; $display("FAIL diagram example: %0d", target); end
    for (int n = 0; n < 3000; n++) begin
      bit et;
      int off;
      a = ($urandom_range(0, 1) == 0) ? 0 : $urandom;
      pc_e = $urandom & 32'h0FFF_FFFC;
      off = $urandom_range(0, 65535) - 32768;
      imm = word_t'(off);
      {is_beqz, is_bnez} = 2'($urandom_range(0, 2));
      #1;
      et = (is_beqz && a == 0) || (is_bnez && a != 0);
      checks++;
      if (taken !== et || target !== word_t'(longint'(pc_e) + 4 + 4 * off) || zero !== (a == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL a %h pc %h off %0d: taken %b target %h", a, pc_e, off, taken, target);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
