// adder: WIDTH-bit two's-complement adder used for address arithmetic.
//
// The core uses two of them, both combinational: one adds the constant 4 to
// the PC to form the next sequential address, the other adds the sign-extended
// immediate to the PC to form branch and jal targets. The carry out is dropped,
// so addresses wrap modulo 2**WIDTH.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
