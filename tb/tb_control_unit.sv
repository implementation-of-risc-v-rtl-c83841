// tb_control_unit: self-checking test of the instruction decoder.
//
// Every RV32I instruction the core executes, plus bit-30 variants and
// unsupported opcodes, is encoded with rv_asm_pkg and decoded; each output
// field is compared with a table written here from the instruction's meaning.
module tb_control_unit;
  import riscv_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(instr[6:0]), .funct3(instr[14:12]), .bit30(instr[30]), .ctrl(ctrl));

  // exp: {reg_write, mem_write, alu_src_imm, alu_src_a, wb_sel, imm_fmt, alu_op, branch, jump, jalr, illegal}
  task automatic check(input string name, input logic [31:0] i, input ctrl_t exp);
    instr = i;
    #1;
    checks++;
    // Fields that do not matter for an instruction are compared only where
    // they affect state: imm_fmt/alu_src for non-writing no-ops are ignored.
    if (exp.illegal) begin
      if (ctrl.illegal !== 1'b1 || ctrl.reg_write !== 1'b0 || ctrl.mem_write !== 1'b0 ||
          ctrl.branch !== BR_NONE || ctrl.jump !== 1'b0 || ctrl.jalr !== 1'b0) begin
        failures++;
        $display("FAIL %s: %p", name, ctrl);
      end
    end else if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: got %p exp %p", name, ctrl, exp);
    end
  endtask

  function automatic ctrl_t c(input logic rw, input logic mw, input logic si, input logic [1:0] sa,
                              input logic [1:0] wb, input imm_fmt_e f, input alu_op_e op,
                              input branch_e br, input logic j, input logic jr);
    return '{reg_write: rw, mem_write: mw, alu_src_imm: si, alu_src_a: sa, wb_sel: wb, imm_fmt: f,
             alu_op: op, branch: br, jump: j, jalr: jr, illegal: 1'b0};
  endfunction

  ctrl_t ill;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ill = '0;
    ill.illegal = 1'b1;
    repeat (20) begin
      logic [4:0] rd, r1, r2;
      logic [11:0] im;
      rd = 5'($urandom); r1 = 5'($urandom); r2 = 5'($urandom); im = 12'($urandom);
      // Register-register.
      check("add",  add (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_ADD, BR_NONE,0,0));
      check("sub",  sub (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_SUB, BR_NONE,0,0));
      check("sll",  sll (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_SLL, BR_NONE,0,0));
      check("slt",  slt (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_SLT, BR_NONE,0,0));
      check("sltu", sltu(rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_SLTU,BR_NONE,0,0));
      check("xor",  xor_(rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_XOR, BR_NONE,0,0));
      check("srl",  srl (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_SRL, BR_NONE,0,0));
      check("sra",  sra (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_SRA, BR_NONE,0,0));
      check("or",   or_ (rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_OR,  BR_NONE,0,0));
      check("and",  and_(rd, r1, r2), c(1,0,0,0,0,IMM_I,ALU_AND, BR_NONE,0,0));
      // Register-immediate: bit 30 of addi's immediate must not make it sub.
      check("addi",  i_type({1'b1, 1'b1, im[9:0]}, r1, 3'd0, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_ADD, BR_NONE,0,0));
      check("slti",  i_type(im, r1, 3'd2, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_SLT, BR_NONE,0,0));
      check("sltiu", i_type(im, r1, 3'd3, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_SLTU,BR_NONE,0,0));
      check("xori",  i_type(im, r1, 3'd4, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_XOR, BR_NONE,0,0));
      check("ori",   i_type(im, r1, 3'd6, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_OR,  BR_NONE,0,0));
      check("andi",  i_type(im, r1, 3'd7, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_AND, BR_NONE,0,0));
      check("slli",  i_type({7'h00, im[4:0]}, r1, 3'd1, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_SLL,BR_NONE,0,0));
      check("srli",  i_type({7'h00, im[4:0]}, r1, 3'd5, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_SRL,BR_NONE,0,0));
      check("srai",  i_type({7'h20, im[4:0]}, r1, 3'd5, rd, 7'b0010011), c(1,0,1,0,0,IMM_I,ALU_SRA,BR_NONE,0,0));
      // Loads and stores.
      for (int f = 0; f < 8; f++) begin
        if (f == 3 || f == 6 || f == 7) continue;
        check("load", load(3'(f), rd, r1, im), c(1,0,1,0,1,IMM_I,ALU_ADD,BR_NONE,0,0));
      end
      for (int f = 0; f < 3; f++)
        check("store", s_type(im, r2, r1, 3'(f)), c(0,1,1,0,0,IMM_S,ALU_ADD,BR_NONE,0,0));
      // Branches.
      check("beq",  b_type({im, 1'b0}, r2, r1, 3'd0), c(0,0,0,0,0,IMM_B,ALU_SUB, BR_IF_ZERO, 0,0));
      check("bne",  b_type({im, 1'b0}, r2, r1, 3'd1), c(0,0,0,0,0,IMM_B,ALU_SUB, BR_IF_NZERO,0,0));
      check("blt",  b_type({im, 1'b0}, r2, r1, 3'd4), c(0,0,0,0,0,IMM_B,ALU_SLT, BR_IF_NZERO,0,0));
      check("bge",  b_type({im, 1'b0}, r2, r1, 3'd5), c(0,0,0,0,0,IMM_B,ALU_SLT, BR_IF_ZERO, 0,0));
      check("bltu", b_type({im, 1'b0}, r2, r1, 3'd6), c(0,0,0,0,0,IMM_B,ALU_SLTU,BR_IF_NZERO,0,0));
      check("bgeu", b_type({im, 1'b0}, r2, r1, 3'd7), c(0,0,0,0,0,IMM_B,ALU_SLTU,BR_IF_ZERO, 0,0));
      // Jumps and upper immediates.
      check("jal",   j_type({im, 9'h0}, rd), c(1,0,0,0,2,IMM_J,ALU_ADD,BR_NONE,1,0));
      check("jalr",  jalr(rd, r1, im),       c(1,0,1,0,2,IMM_I,ALU_ADD,BR_NONE,0,1));
      check("lui",   lui(rd, {im, 8'h0}),    c(1,0,1,2,0,IMM_U,ALU_ADD,BR_NONE,0,0));
      check("auipc", auipc(rd, {im, 8'h0}),  c(1,0,1,1,0,IMM_U,ALU_ADD,BR_NONE,0,0));
      // Unsupported.
      check("ecall",  32'h0000_0073, ill);
      check("fence",  32'h0FF0_000F, ill);
      check("b-f3=2", b_type({im, 1'b0}, r2, r1, 3'd2), ill);
      check("zeros",  32'h0000_0000, ill);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
