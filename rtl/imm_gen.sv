// imm_gen: immediate generator of the RV32I core.
//
// It takes the 32-bit instruction and the format chosen by the control unit
// and returns the sign-extended 32-bit immediate, following the RISC-V base
// ISA encodings: I (bits 31:20), S (31:25 and 11:7), B (31, 7, 30:25, 11:8,
// with bit 0 = 0), U (31:12 shifted left by 12) and J (31, 19:12, 20, 30:21,
// with bit 0 = 0). Purely combinational. The sign bit imm[31] is
// instruction bit 31 in every format, so that output bit is a plain wire.
module imm_gen
  import riscv_pkg::*;
(
  input  logic [31:0] instr,
  input  imm_fmt_e    fmt,
  output logic [31:0] imm
);

  always_comb begin
    unique case (fmt)
      IMM_S:   imm = {{21{instr[31]}}, instr[30:25], instr[11:7]};
      IMM_B:   imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   imm = {instr[31:12], 12'b0};
      IMM_J:   imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = {{21{instr[31]}}, instr[30:20]};
    endcase
  end

endmodule
