// tb_program_counter: self-checking test of the PC register.
//
// Checks that reset gives address 0, that the register takes pc_next on each
// rising edge (one update per cycle) and that reset wins over pc_next.
module tb_program_counter;
  logic        clk = 1'b0, rst;
  logic [31:0] pc_next, pc, exp;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .pc_next(pc_next), .pc(pc));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] e);
    checks++;
    if (pc !== e) begin
      failures++;
      $display("FAIL pc=%h exp=%h", pc, e);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; pc_next = 32'h1234_5678;
    @(posedge clk); #1;
    check(32'h0);
    rst = 1'b0;
    exp = 32'h0;
    repeat (200) begin
      pc_next = exp + ((($urandom % 4) == 0) ? $urandom : 32'd4);
      exp = pc_next;
      @(posedge clk); #1;
      check(exp);
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check(32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
