// riscv_pkg: types and constants shared by the single-cycle RV32I core.
//
// It holds the 7-bit major opcodes of RV32I, the 4-bit ALU operation code
// carried from the control unit to the ALU (alu_control[3:0]), and the
// select encodings of the datapath multiplexers. The opcodes are those of the
// RISC-V base ISA. The ALU codes ADD = 2 and SUB = 4 follow the values seen on
// the alu_control bus for add and sub in the reference simulation; the other
// ALU codes and all multiplexer encodings are this design's own choice.
package riscv_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;

  // RV32I major opcodes (instruction bits [6:0]).
  typedef enum logic [6:0] {
    OP_LOAD   = 7'b0000011,
    OP_IMM    = 7'b0010011,
    OP_AUIPC  = 7'b0010111,
    OP_STORE  = 7'b0100011,
    OP_REG    = 7'b0110011,
    OP_LUI    = 7'b0110111,
    OP_BRANCH = 7'b1100011,
    OP_JALR   = 7'b1100111,
    OP_JAL    = 7'b1101111
  } opcode_e;

  // ALU operation (alu_control[3:0]).
  typedef enum logic [3:0] {
    ALU_AND  = 4'd0,
    ALU_OR   = 4'd1,
    ALU_ADD  = 4'd2,
    ALU_SLL  = 4'd3,
    ALU_SUB  = 4'd4,
    ALU_SRL  = 4'd5,
    ALU_SRA  = 4'd6,
    ALU_XOR  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SLTU = 4'd9
  } alu_op_e;

  // Immediate formats.
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_fmt_e;

  // ALU operand A select (mux3 input index).
  localparam logic [1:0] SRCA_RS1  = 2'd0;
  localparam logic [1:0] SRCA_PC   = 2'd1;
  localparam logic [1:0] SRCA_ZERO = 2'd2;

  // Write-back value select (mux3 input index).
  localparam logic [1:0] WB_ALU  = 2'd0;
  localparam logic [1:0] WB_MEM  = 2'd1;
  localparam logic [1:0] WB_PC4  = 2'd2;

  // Next-PC select (mux3 input index).
  localparam logic [1:0] PC_PLUS4  = 2'd0;
  localparam logic [1:0] PC_BRANCH = 2'd1;
  localparam logic [1:0] PC_JALR   = 2'd2;

  // Branch condition, derived from funct3 of a B-type instruction.
  typedef enum logic [1:0] {
    BR_NONE     = 2'd0,  // not a conditional branch
    BR_IF_ZERO  = 2'd1,  // taken when the ALU result is zero (beq, bge, bgeu)
    BR_IF_NZERO = 2'd2   // taken when the ALU result is non-zero (bne, blt, bltu)
  } branch_e;

  // All control signals of one instruction.
  typedef struct packed {
    logic       reg_write;
    logic       mem_write;
    logic       alu_src_imm;   // ALU operand B: 1 = immediate, 0 = rs2
    logic [1:0] alu_src_a;     // SRCA_*
    logic [1:0] wb_sel;        // WB_*
    imm_fmt_e   imm_fmt;
    alu_op_e    alu_op;
    branch_e    branch;
    logic       jump;          // jal
    logic       jalr;          // jalr
    logic       illegal;       // opcode not handled: executes as a no-op
  } ctrl_t;

endpackage
