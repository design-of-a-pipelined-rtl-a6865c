// int_alu: 32-bit integer ALU of one lane of the integer SIMD module.
//
// Combinational. Performs the five integer operations of the instruction set
// (add, subtract, and, or, xor) and a pass-through of operand B that carries
// the immediate of movs and the link address of jals to the write-back stage.
// The CPU holds two copies, one per data lane; both see the same operation.
module int_alu
  import simd_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      default:   y = b;
    endcase
  end

endmodule
