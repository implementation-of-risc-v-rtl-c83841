// tb_instr_mem: self-checking test of the instruction memory.
//
// Loads random words through the write port at random word addresses, then
// reads them back at the same addresses through the fetch port, checking the
// combinational (same-cycle) read and that address bits [1:0] are ignored.
// Uses a 4 KiB memory to keep the run short.
module tb_instr_mem;
  localparam int unsigned BYTES = 4096;
  logic        clk = 1'b0, we;
  logic [31:0] addr, instr, waddr, wdata;
  logic [31:0] model [BYTES/4];
  bit          valid [BYTES/4];
  int checks = 0, failures = 0;

  instr_mem #(.BYTES(BYTES)) dut (.clk(clk), .addr(addr), .instr(instr), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; waddr = '0; wdata = '0;
    foreach (valid[i]) valid[i] = 1'b0;
    repeat (2000) begin
      int unsigned w;
      w = $urandom % (BYTES / 4);
      @(negedge clk);
      we = 1'b1; waddr = w * 4; wdata = $urandom;
      model[w] = wdata; valid[w] = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    foreach (model[i]) begin
      if (!valid[i]) continue;
      addr = i * 4 + ($urandom % 4);
      #1;
      checks++;
      if (instr !== model[i]) begin
        failures++;
        $display("FAIL addr=%h instr=%h exp=%h", addr, instr, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
