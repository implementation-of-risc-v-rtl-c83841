// data_mem: byte-addressed data memory with RV32I load/store sizing.
//
// BYTES bytes (16 KiB by default) stored as 32-bit little-endian words. The
// address comes from the ALU; funct3 of the load or store gives the access
// size and, for loads, the extension: byte (000), half (001), word (010),
// unsigned byte (100), unsigned half (101). Reads are combinational, so a
// load returns its data in the same cycle; writes happen at posedge clk when
// we is high, enabling only the addressed byte lanes. Accesses are assumed
// naturally aligned: the low address bits select the lane(s) and a misaligned
// half or word access is not split. Addresses wrap to the memory size. The
// memory is reset-free: its contents are undefined until written.
module data_mem #(
  parameter int unsigned BYTES = 16384
) (
  input  logic        clk,
  input  logic        we,
  input  logic [2:0]  funct3,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [31:0] word;
  logic [7:0]  rbyte;
  logic [15:0] rhalf;
  logic [3:0]  be;
  logic [31:0] wword;

  assign word  = mem[addr[AW+1:2]];
  assign rbyte = word[8*addr[1:0] +: 8];
  assign rhalf = addr[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (funct3)
      3'b000:  rdata = {{24{rbyte[7]}}, rbyte};
      3'b001:  rdata = {{16{rhalf[15]}}, rhalf};
      3'b100:  rdata = {24'b0, rbyte};
      3'b101:  rdata = {16'b0, rhalf};
      default: rdata = word;
    endcase
  end

  // Byte enables and the store data replicated onto every lane.
  always_comb begin
    unique case (funct3[1:0])
      2'b00:   begin be = 4'b0001 << addr[1:0];          wword = {4{wdata[7:0]}};  end
      2'b01:   begin be = addr[1] ? 4'b1100 : 4'b0011;   wword = {2{wdata[15:0]}}; end
      default: begin be = 4'b1111;                       wword = wdata;            end
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[addr[AW+1:2]][8*i +: 8] <= wword[8*i +: 8];
    end
  end

endmodule
