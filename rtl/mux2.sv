// mux2: two-input multiplexer of WIDTH bits.
//
// In the core it chooses the ALU's second operand: the rs2 register value
// (sel = 0) or the sign-extended immediate (sel = 1). Purely combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
