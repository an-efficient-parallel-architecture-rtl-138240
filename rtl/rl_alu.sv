// rl_alu: the arithmetic/logic unit inside a register-in-logic element.
//
// It always works on the element's own two registers, A = R0 and B = R1, so
// no operand ever travels through a register file. The result is purely
// combinational; the element decides whether to keep it in R0/R1 or to put it
// on an output port. The architecture names the ALU and its R0/R1 operands; the
// operation set (add, subtract, three logic ops, signed min/max, reverse
// subtract) is this implementation's choice, picked for filter and FFT kernels.
module rl_alu
  import rl_pkg::*;
#(
  parameter int W = XLEN
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,   // R0
  input  logic [W-1:0] b,   // R1
  output logic [W-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_MIN:  y = ($signed(a) < $signed(b)) ? a : b;
      ALU_MAX:  y = ($signed(a) < $signed(b)) ? b : a;
      ALU_RSUB: y = b - a;
      default:  y = a + b;
    endcase
  end

endmodule
