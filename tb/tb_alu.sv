// tb_alu: every operation on random and corner operands, compared with
// results computed here in 64-bit arithmetic, including the signed-overflow
// flag of ADD and SUB.
module tb_alu;
  import pipe5_pkg::*;
  alu_op_t op;
  word_t   a, b, y;
  logic    ovf;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pick();
    case ($urandom_range(0, 5))
      0: return 32'h7FFF_FFFF;
      1: return 32'h8000_0000;
      2: return 32'hFFFF_FFFF;
      3: return 32'h0;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      word_t ey;
      logic  eo;
      longint s;
      op = alu_op_t'($urandom_range(0, 6));
      a  = pick();
      b  = pick();
      #1;
      eo = 1'b0;
      case (op)
        ALU_ADD: begin s = longint'($signed(a)) + longint'($signed(b)); ey = word_t'(s);
                       eo = (s > 64'sh7FFFFFFF) || (s < -64'sh80000000); end
        ALU_SUB: begin s = longint'($signed(a)) - longint'($signed(b)); ey = word_t'(s);
                       eo = (s > 64'sh7FFFFFFF) || (s < -64'sh80000000); end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        ALU_XOR: ey = a ^ b;
        ALU_SLT: ey = (longint'($signed(a)) < longint'($signed(b))) ? 1 : 0;
        default: ey = b;
      endcase
      checks++;
      if (y !== ey || ovf !== eo) begin
        failures++;
        if (failures < 10) $display("FAIL op %s a %h b %h: y %h ovf %b, expected %h %b", op.name(), a, b, y, ovf, ey, eo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
