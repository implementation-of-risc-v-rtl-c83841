// program_counter: the PC register of the single-cycle core.
//
// It holds the byte address of the instruction being executed and loads the
// next address on every rising clock edge, so one instruction completes per
// cycle. A synchronous, active-high reset puts it at RESET_PC (address 0, where
// the program starts); the reset style is this design's choice.
//
// Interface: pc_next is sampled at posedge clk; pc is the registered value.
module program_counter #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc_next,
  output logic [31:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
