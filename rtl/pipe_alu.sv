// pipe_alu: arithmetic and logical unit of a PIPE processor.
//
// Combinational, one clock of the execute stage. Operations: add, the two
// subtracts (a-b and b-a), or, and, exclusive or, not (of a), and a move of
// a. Operand a is Rj (Ri for the immediate forms), operand b is Rk or the
// sign-extended displacement. The operation set follows the document; the
// reverse subtract as the second kind of subtract and the move are this
// design's reading. Shifts are done by pipe_shifter.
module pipe_alu
  import pipe_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_RSUB: y = b - a;
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      ALU_XOR:  y = a ^ b;
      ALU_NOT:  y = ~a;
      default:  y = a;    // ALU_MOV
    endcase
  end
endmodule
