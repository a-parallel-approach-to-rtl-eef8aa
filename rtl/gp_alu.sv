// gp_alu: execution core of one processing element.
//
// Purely combinational. Takes up to three 64-bit operands (a, b, c) and an
// operation and produces one 64-bit result. The operation set follows the
// paper's description of a core that offers the functions of a standard-cell
// library (ADD, SUB, AND, OR, XOR, and-or-invert and similar) on one, two or
// three operands. The exact list, and using three-input AOI21/OAI21 in place of
// the five-input AOI32 the paper names (an instruction carries at most three
// operands), are this design's choices. Unused operand inputs are ignored.
module gp_alu
  import gp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  word_t   c,
  output word_t   y
);

  always_comb begin
    unique case (op)
      OP_PASS:  y = a;
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_NAND:  y = ~(a & b);
      OP_NOR:   y = ~(a | b);
      OP_XNOR:  y = ~(a ^ b);
      OP_NOT:   y = ~a;
      OP_AND3:  y = a & b & c;
      OP_OR3:   y = a | b | c;
      OP_XOR3:  y = a ^ b ^ c;
      OP_AOI21: y = ~((a & b) | c);
      OP_OAI21: y = ~((a | b) & c);
      OP_MUX:   y = (a & ~c) | (b & c);
      OP_ADD3:  y = a + b + c;
      default:  y = '0;
    endcase
  end

endmodule
