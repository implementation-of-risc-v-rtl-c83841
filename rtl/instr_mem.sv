// instr_mem: instruction memory of the single-cycle core.
//
// BYTES bytes organised as 32-bit words (64 KiB by default, 16384 words).
// The read port is combinational: the word at byte address addr (bits [1:0]
// ignored, address wrapped to the memory size) appears on instr in the same
// cycle, as a single-cycle fetch needs. Programs are loaded through a clocked
// write port (we, waddr, wdata), typically while the core is held in reset.
// The write port is this design's choice; the memory's size is that of the
// instruction RAM of the 32 MHz FPGA implementation the design's figures refer
// to. Read-during-write of the same word returns the old contents.
module instr_mem #(
  parameter int unsigned BYTES = 65536
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  assign instr = mem[addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

endmodule
