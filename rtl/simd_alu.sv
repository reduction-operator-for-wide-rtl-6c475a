// simd_alu: combinational 16-bit ALU shared by the PEs and the control processor.
//
// It computes the associative combine operations a reduction needs (add,
// multiply, min, max, and, or, xor), subtraction, a move of operand B, and
// the compares. `result` carries the arithmetic result; `cond` carries the
// outcome of a compare. Operations the ALU does not handle give result B and
// cond 0. Purely combinational: the caller registers the outputs.
module simd_alu
  import simd_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t result,
  output logic  cond
);

  always_comb begin
    result = b;
    cond   = 1'b0;
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MUL:  result = a * b;   // low half of the product
      OP_MIN:  result = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX:  result = ($signed(a) > $signed(b)) ? a : b;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_CLT:  cond = $signed(a) < $signed(b);
      OP_CLTU: cond = a < b;
      OP_CGE:  cond = $signed(a) >= $signed(b);
      OP_CEQ:  cond = a == b;
      OP_CNE:  cond = a != b;
      default: result = b;
    endcase
  end

endmodule
