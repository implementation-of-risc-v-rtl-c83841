// tb_imm_gen: self-checking test of the immediate generator.
//
// For each format, a random immediate is encoded into an instruction with the
// field layouts of rv_asm_pkg (the other fields random) and the generator
// must return it sign-extended.
module tb_imm_gen;
  import riscv_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr, imm;
  imm_fmt_e    fmt;
  int checks = 0, failures = 0;

  imm_gen dut (.instr(instr), .fmt(fmt), .imm(imm));

  task automatic check(input imm_fmt_e f, input logic [31:0] i, input logic [31:0] exp);
    fmt = f; instr = i;
    #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("FAIL fmt=%0d instr=%h imm=%h exp=%h", f, i, imm, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      logic [11:0] i12;
      logic [12:0] b13;
      logic [19:0] u20;
      logic [20:0] j21;
      i12 = 12'($urandom);
      b13 = {12'($urandom), 1'b0};
      u20 = 20'($urandom);
      j21 = {20'($urandom), 1'b0};
      check(IMM_I, i_type(i12, 5'($urandom), 3'($urandom), 5'($urandom), 7'b0010011), 32'($signed(i12)));
      check(IMM_S, s_type(i12, 5'($urandom), 5'($urandom), 3'($urandom)), 32'($signed(i12)));
      check(IMM_B, b_type(b13, 5'($urandom), 5'($urandom), 3'($urandom)), 32'($signed(b13)));
      check(IMM_U, u_type(u20, 5'($urandom), 7'b0110111), {u20, 12'h000});
      check(IMM_J, j_type(j21, 5'($urandom)), 32'($signed(j21)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
