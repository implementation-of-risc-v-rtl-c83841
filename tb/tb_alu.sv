// tb_alu: self-checking test of the ALU.
//
// Drives every operation with directed corner operands and random operands
// and compares result and zero with a reference written here from the RV32I
// definitions of each operation. Also checks the operation codes for add (2)
// and sub (4).
module tb_alu;
  import riscv_pkg::*;

  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .result(result), .zero(zero));

  function automatic logic [31:0] ref_alu(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] r;
    int unsigned sh;
    sh = y % 32;
    case (o)
      ALU_AND:  r = x & y;
      ALU_OR:   r = x | y;
      ALU_ADD:  r = x + y;
      ALU_SUB:  r = x + ~y + 1;
      ALU_XOR:  r = (x | y) & ~(x & y);
      ALU_SLT:  r = ((x[31] != y[31]) ? x[31] : (x < y)) ? 32'd1 : 32'd0;
      ALU_SLTU: r = (x < y) ? 32'd1 : 32'd0;
      ALU_SLL:  begin r = x; repeat (sh) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = x; repeat (sh) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = x; repeat (sh) r = {r[31], r[31:1]}; end
      default:  r = '0;
    endcase
    return r;
  endfunction

  task automatic check(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h result=%h zero=%b exp=%h", o, x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6];
    alu_op_e ops [10];
    corner = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};
    ops = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SLL, ALU_SUB, ALU_SRL, ALU_SRA, ALU_XOR, ALU_SLT, ALU_SLTU};
    checks++;
    if (ALU_ADD != 4'd2 || ALU_SUB != 4'd4) failures++;
    foreach (ops[k])
      foreach (corner[i])
        foreach (corner[j]) check(ops[k], corner[i], corner[j]);
    repeat (3000) check(ops[$urandom_range(0, 9)], $urandom, $urandom);
    // Equal operands must raise zero on sub.
    repeat (50) begin
      logic [31:0] v;
      v = $urandom;
      check(ALU_SUB, v, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
