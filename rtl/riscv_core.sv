// riscv_core: single-cycle RV32I processor core.
//
// Every instruction is fetched, decoded, executed, given its memory access
// and written back within one clock cycle; the only state updated at the
// clock edge is the PC, the register file and the data memory.
//
// Datapath (left to right):
//   program_counter -> instr_mem: the PC addresses the instruction memory.
//   adder (PC + 4) and adder (PC + immediate) form the sequential and
//     branch/jal targets.
//   control_unit decodes opcode [6:0], funct3 [14:12] and bit 30.
//   reg_file reads rs1 [19:15] and rs2 [24:20] and writes rd [11:7].
//   imm_gen builds the immediate; mux3 picks ALU operand A (rs1, PC or 0)
//     and mux2 operand B (rs2 or immediate).
//   alu computes the result and the zero flag.
//   data_mem is addressed by the ALU result; loads and stores use funct3.
//   mux3 picks the write-back value (ALU result, load data or PC + 4).
//   mux3 picks the next PC (PC + 4, branch/jal target, jalr target).
// A conditional branch is taken when the zero flag is 1 (beq, bge, bgeu) or
// 0 (bne, blt, bltu), with the ALU set to sub, slt or sltu by the decoder.
//
// The PC, +4 adder, instruction memory, control unit, register file and ALU,
// and how their fields connect, follow the design's block diagram. The
// immediate path, data memory, result multiplexer and branch/jump next-PC
// logic complete it to the RV32I instruction set the design targets; their
// structure is this design's own. Fence, ecall, ebreak and CSR instructions
// are not supported and execute as no-ops.
//
// Interface: clk, synchronous active-high rst (PC to 0, registers to 0, no
// memory write while in reset). The instruction memory is loaded through
// prog_we/prog_addr/prog_data (one word per clock, best done in reset). The
// remaining outputs show the current instruction's PC, encoding, ALU
// operation, zero flag and register write-back, for observation.
module riscv_core
  import riscv_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 65536,
  parameter int unsigned DMEM_BYTES = 16384
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic [3:0]  alu_control,
  output logic        zero,
  output logic        reg_write,
  output logic [4:0]  write_reg,
  output logic [31:0] write_data,
  output logic        mem_write,
  output logic        illegal
);

  ctrl_t       ctrl;
  logic [31:0] pc_next, pc_plus4, pc_target, jalr_target;
  logic [31:0] rdata1, rdata2, imm, src_a, src_b, alu_result, load_data;
  logic [1:0]  pc_sel;
  logic        branch_taken;

  // Fetch.
  program_counter u_pc (
    .clk     (clk),
    .rst     (rst),
    .pc_next (pc_next),
    .pc      (pc)
  );

  adder #(.WIDTH(32)) u_pc_plus4 (
    .a   (pc),
    .b   (32'd4),
    .sum (pc_plus4)
  );

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk   (clk),
    .addr  (pc),
    .instr (instr),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data)
  );

  // Decode.
  control_unit u_ctrl (
    .opcode (instr[6:0]),
    .funct3 (instr[14:12]),
    .bit30  (instr[30]),
    .ctrl   (ctrl)
  );

  reg_file u_rf (
    .clk    (clk),
    .rst    (rst),
    .rs1    (instr[19:15]),
    .rs2    (instr[24:20]),
    .rd     (instr[11:7]),
    .we     (ctrl.reg_write),
    .wdata  (write_data),
    .rdata1 (rdata1),
    .rdata2 (rdata2)
  );

  imm_gen u_imm (
    .instr (instr),
    .fmt   (ctrl.imm_fmt),
    .imm   (imm)
  );

  // Execute.
  mux3 #(.WIDTH(32)) u_src_a_mux (
    .d0  (rdata1),
    .d1  (pc),
    .d2  (32'd0),
    .sel (ctrl.alu_src_a),
    .y   (src_a)
  );

  mux2 #(.WIDTH(32)) u_src_b_mux (
    .d0  (rdata2),
    .d1  (imm),
    .sel (ctrl.alu_src_imm),
    .y   (src_b)
  );

  alu u_alu (
    .a      (src_a),
    .b      (src_b),
    .op     (ctrl.alu_op),
    .result (alu_result),
    .zero   (zero)
  );

  adder #(.WIDTH(32)) u_pc_target (
    .a   (pc),
    .b   (imm),
    .sum (pc_target)
  );

  // Memory access.
  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk    (clk),
    .we     (mem_write),
    .funct3 (instr[14:12]),
    .addr   (alu_result),
    .wdata  (rdata2),
    .rdata  (load_data)
  );

  // Write-back.
  mux3 #(.WIDTH(32)) u_wb_mux (
    .d0  (alu_result),
    .d1  (load_data),
    .d2  (pc_plus4),
    .sel (ctrl.wb_sel),
    .y   (write_data)
  );

  // Next PC.
  always_comb begin
    unique case (ctrl.branch)
      BR_IF_ZERO:  branch_taken = zero;
      BR_IF_NZERO: branch_taken = !zero;
      default:     branch_taken = 1'b0;
    endcase
  end

  assign jalr_target = {alu_result[31:1], 1'b0};
  assign pc_sel = ctrl.jalr                   ? PC_JALR   :
                  (ctrl.jump || branch_taken) ? PC_BRANCH : PC_PLUS4;

  mux3 #(.WIDTH(32)) u_pc_mux (
    .d0  (pc_plus4),
    .d1  (pc_target),
    .d2  (jalr_target),
    .sel (pc_sel),
    .y   (pc_next)
  );

  // Instruction addresses must stay word-aligned: the core has no
  // misaligned-fetch exception, so a branch or jalr to a misaligned target
  // is a program error.
  pc_aligned: assert property (@(posedge clk) disable iff (rst) pc[1:0] == 2'b00)
    else $error("misaligned PC %h", pc);

  assign alu_control = ctrl.alu_op;
  assign reg_write   = ctrl.reg_write && !rst;
  assign write_reg   = instr[11:7];
  assign mem_write   = ctrl.mem_write && !rst;
  assign illegal     = ctrl.illegal;

endmodule
