// reg_file: the 32 x 32-bit integer register file (x0..x31).
//
// Two read ports are combinational: rs1/rs2 (instruction bits [19:15] and
// [24:20]) select rdata1/rdata2 in the same cycle. One write port is clocked:
// when we is high, wdata is written to register rd (bits [11:7]) at posedge
// clk. x0 always reads as zero and ignores writes, as RISC-V requires. A
// synchronous, active-high reset clears all registers (the reset input is
// part of the design; clearing to zero is this design's choice). A write in
// the same cycle as a read of the same register is seen by the read only in
// the next cycle, which is what a single-cycle datapath needs.
module reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  input  logic [4:0]  rd,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata1,
  output logic [31:0] rdata2
);

  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && rd != 5'd0) begin
      regs[rd] <= wdata;
    end
  end

  assign rdata1 = (rs1 == 5'd0) ? '0 : regs[rs1];
  assign rdata2 = (rs2 == 5'd0) ? '0 : regs[rs2];

endmodule
