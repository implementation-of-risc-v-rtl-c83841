// tb_adder: self-checking test of the 32-bit address adder.
//
// Checks PC + 4 on word-aligned addresses, wrap-around at 2**32 and random
// sums against a bit-serial ripple-carry reference.
module tb_adder;
  logic [31:0] a, b, sum;
  int checks = 0, failures = 0;

  adder #(.WIDTH(32)) dut (.a(a), .b(b), .sum(sum));

  function automatic logic [31:0] ripple(input logic [31:0] x, input logic [31:0] y);
    logic c;
    logic [31:0] s;
    c = 1'b0;
    for (int i = 0; i < 32; i++) begin
      s[i] = x[i] ^ y[i] ^ c;
      c    = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
    end
    return s;
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (sum !== ripple(x, y)) begin
      failures++;
      $display("FAIL %h + %h = %h", x, y, sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) check(32'(i * 4), 32'd4);
    check(32'hFFFF_FFFC, 32'd4);
    check(32'h0000_0100, 32'hFFFF_FFF0);
    repeat (2000) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
