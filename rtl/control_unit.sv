// control_unit: instruction decoder of the single-cycle core.
//
// Its inputs are the fields the decoder needs: opcode (bits [6:0]), funct3
// (bits [14:12]) and bit 30 (funct7[5], which tells sub from add and sra from
// srl). From them it produces, combinationally, one ctrl_t bundle: register
// write enable, memory write enable, ALU operand selects, immediate format,
// write-back select, branch condition, jump flags and the 4-bit ALU
// operation. Conditional branches are decided by the ALU's zero flag alone:
// beq/bne compute a - b, blt/bge compute slt and bltu/bgeu compute sltu, and
// the branch is taken on zero or non-zero result. Opcodes outside RV32I's
// load, store, register, immediate, branch, jal, jalr, lui and auipc groups
// (fence, ecall, ebreak, csr, anything unknown) raise illegal and execute as a
// no-op that only advances the PC. The field split is the design's; the
// encodings of the outputs are this design's own.
module control_unit
  import riscv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic       bit30,
  output ctrl_t      ctrl
);

  // ALU operation of a register-register or register-immediate instruction.
  function automatic alu_op_e arith_op(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl = '{
      reg_write:   1'b0,
      mem_write:   1'b0,
      alu_src_imm: 1'b0,
      alu_src_a:   SRCA_RS1,
      wb_sel:      WB_ALU,
      imm_fmt:     IMM_I,
      alu_op:      ALU_ADD,
      branch:      BR_NONE,
      jump:        1'b0,
      jalr:        1'b0,
      illegal:     1'b0
    };
    unique case (opcode)
      OP_REG: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = arith_op(funct3, bit30, 1'b1);
      end
      OP_IMM: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_op      = arith_op(funct3, bit30, 1'b0);
      end
      OP_LOAD: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.wb_sel      = WB_MEM;
      end
      OP_STORE: begin
        ctrl.mem_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.imm_fmt     = IMM_S;
      end
      OP_BRANCH: begin
        ctrl.imm_fmt = IMM_B;
        unique case (funct3)
          3'b000: begin ctrl.alu_op = ALU_SUB;  ctrl.branch = BR_IF_ZERO;  end  // beq
          3'b001: begin ctrl.alu_op = ALU_SUB;  ctrl.branch = BR_IF_NZERO; end  // bne
          3'b100: begin ctrl.alu_op = ALU_SLT;  ctrl.branch = BR_IF_NZERO; end  // blt
          3'b101: begin ctrl.alu_op = ALU_SLT;  ctrl.branch = BR_IF_ZERO;  end  // bge
          3'b110: begin ctrl.alu_op = ALU_SLTU; ctrl.branch = BR_IF_NZERO; end  // bltu
          3'b111: begin ctrl.alu_op = ALU_SLTU; ctrl.branch = BR_IF_ZERO;  end  // bgeu
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OP_JAL: begin
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_PC4;
        ctrl.imm_fmt   = IMM_J;
        ctrl.jump      = 1'b1;
      end
      OP_JALR: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.wb_sel      = WB_PC4;
        ctrl.jalr        = 1'b1;
      end
      OP_LUI: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_src_a   = SRCA_ZERO;
        ctrl.imm_fmt     = IMM_U;
      end
      OP_AUIPC: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_src_a   = SRCA_PC;
        ctrl.imm_fmt     = IMM_U;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule
