// mux3: three-input multiplexer of WIDTH bits.
//
// In the core it chooses the ALU's first operand (rs1, PC or zero), the value
// written back to the register file (ALU result, load data or PC+4) and the
// next PC (PC+4, branch/jal target or jalr target). sel = 0, 1, 2 selects
// d0, d1, d2; sel = 3 also selects d0. Purely combinational.
module mux3 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd1:    y = d1;
      2'd2:    y = d2;
      default: y = d0;
    endcase
  end

endmodule
