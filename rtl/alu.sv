// alu: 32-bit arithmetic and logic unit of the core.
//
// The 4-bit operation code (riscv_pkg::alu_op_e) selects add, sub, and, or,
// xor, set-less-than (signed and unsigned) and the three shifts (shift amount
// = b[4:0]). zero is high when the result is all zeros; the core uses it, with
// sub or slt/sltu, to decide conditional branches. Purely combinational. An
// unused operation code gives result 0.
module alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] result,
  output logic        zero
);

  always_comb begin
    unique case (op)
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_XOR:  result = a ^ b;
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_SLL:  result = a << b[4:0];
      ALU_SRL:  result = a >> b[4:0];
      ALU_SRA:  result = $unsigned($signed(a) >>> b[4:0]);
      default:  result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
