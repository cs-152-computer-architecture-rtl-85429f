// alu: the integer ALU of the EX stage.
//
// Purely combinational. Computes add, subtract, and, or, xor, set-less-than
// (signed) and pass-B (used by LUI, whose immediate the decoder has already
// moved into the upper half). `ovf` flags two's-complement
// overflow of ADD and SUB; whether it raises an exception is decided by the
// instruction (ADD, ADDI, SUB trap; the others ignore it). Overflow as an
// EX-stage exception source follows the exception discussion; the operation
// set is this design's choice.
module alu
  import pipe5_pkg::*;
(
  input  alu_op_t     op,
  input  word_t       a,
  input  word_t       b,
  output word_t       y,
  output logic        ovf
);
  word_t sum, diff;

  always_comb begin
    sum  = a + b;
    diff = a - b;
    ovf  = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y   = sum;
        ovf = (a[XLEN-1] == b[XLEN-1]) && (sum[XLEN-1] != a[XLEN-1]);
      end
      ALU_SUB: begin
        y   = diff;
        ovf = (a[XLEN-1] != b[XLEN-1]) && (diff[XLEN-1] != a[XLEN-1]);
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLT:   y = word_t'($signed(a) < $signed(b));
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
