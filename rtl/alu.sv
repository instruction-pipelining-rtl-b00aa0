// alu: the execute-stage arithmetic/logic unit.
//
// Combinational. Computes y = a <op> b for the operations of pipe_pkg
// (add, subtract, and, or, xor, signed set-less-than, pass A, pass B) and
// raises zero when y is all zeros. The zero output is the branch condition
// "zero?" taken from the ALU output in the execute stage: BEQZ/BNEZ pass (rs)
// through unchanged, so zero = ((rs) == 0). The operation set is this
// implementation's choice; the design only names an ALU.
module alu
  import pipe_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    zero
);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLT:   y = word_t'($signed(a) < $signed(b));
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end

  assign zero = (y == '0);

endmodule
