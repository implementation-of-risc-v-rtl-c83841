// rv_asm_pkg: RV32I instruction encoders for the testbenches.
//
// Each function returns the 32-bit encoding of one instruction, built from
// the RISC-V base ISA field layouts (R, I, S, B, U, J). The testbenches use
// them to write programs and to make decoder stimulus independently of the
// design's own decoding logic.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                         input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] i_type(input logic [11:0] imm, input logic [4:0] rs1, input logic [2:0] f3,
                                         input logic [4:0] rd, input logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] s_type(input logic [11:0] imm, input logic [4:0] rs2, input logic [4:0] rs1,
                                         input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] b_type(input logic [12:0] imm, input logic [4:0] rs2, input logic [4:0] rs1,
                                         input logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] u_type(input logic [19:0] imm, input logic [4:0] rd, input logic [6:0] op);
    return {imm, rd, op};
  endfunction

  function automatic logic [31:0] j_type(input logic [20:0] imm, input logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  // Convenience mnemonics.
  function automatic logic [31:0] add (input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (input logic [4:0] rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sll (input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] slt (input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sltu(input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] srl (input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sra (input logic [4:0] rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] or_ (input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] and_(input logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd7, rd, 7'b0110011); endfunction

  function automatic logic [31:0] addi(input logic [4:0] rd, rs1, input logic [11:0] imm); return i_type(imm, rs1, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] jalr(input logic [4:0] rd, rs1, input logic [11:0] imm); return i_type(imm, rs1, 3'd0, rd, 7'b1100111); endfunction
  function automatic logic [31:0] load(input logic [2:0] f3, input logic [4:0] rd, rs1, input logic [11:0] imm); return i_type(imm, rs1, f3, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lui (input logic [4:0] rd, input logic [19:0] imm); return u_type(imm, rd, 7'b0110111); endfunction
  function automatic logic [31:0] auipc(input logic [4:0] rd, input logic [19:0] imm); return u_type(imm, rd, 7'b0010111); endfunction

endpackage
