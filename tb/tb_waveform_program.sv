// tb_waveform_program: runs the four-instruction sequence of the published
// simulation of this core on the full-size design and checks, cycle by
// cycle, the signals that simulation shows.
//
// Eight addi instructions first give x8/x9 the values 0x18/0x19 and x18..x23
// the values 0x20..0x25. Then add x6,x8,x9 / sub x7,x18,x19 / or x5,x20,x21 /
// xor x28,x22,x23 run on consecutive cycles. For each the test checks the PC
// (stepping by 4, one instruction per clock), the instruction word, the two
// source register numbers and the values read from them, the ALU operation
// code (add 2, sub 4), the destination register and the value written back
// (0x31, 0xFFFFFFFF, 0x23, 0x01). Expected values are worked out by hand.
module tb_waveform_program;
  import rv_asm_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0;
  logic [31:0] pc, instr, write_data;
  logic [3:0]  alu_control;
  logic        zero, reg_write, mem_write, illegal;
  logic [4:0]  write_reg;
  int checks = 0, failures = 0;

  riscv_core dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .pc, .instr, .alu_control, .zero, .reg_write, .write_reg, .write_data, .mem_write, .illegal
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [31:0] word;
    logic [4:0]  rs1, rs2, rd;
    logic [31:0] v1, v2, wd;
    logic [3:0]  op;
  } step_t;

  step_t steps [4];
  logic [31:0] prog [12];

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    steps[0] = '{32'h0094_0333, 5'd8,  5'd9,  5'd6,  32'h18, 32'h19, 32'h0000_0031, 4'd2};
    steps[1] = '{32'h4139_03B3, 5'd18, 5'd19, 5'd7,  32'h20, 32'h21, 32'hFFFF_FFFF, 4'd4};
    steps[2] = '{32'h015A_62B3, 5'd20, 5'd21, 5'd5,  32'h22, 32'h23, 32'h0000_0023, 4'd1};
    steps[3] = '{32'h017B_4E33, 5'd22, 5'd23, 5'd28, 32'h24, 32'h25, 32'h0000_0001, 4'd7};
    prog[0] = addi(5'd8,  5'd0, 12'h018);
    prog[1] = addi(5'd9,  5'd0, 12'h019);
    for (int i = 0; i < 6; i++) prog[2 + i] = addi(5'(18 + i), 5'd0, 12'(32'h20 + i));
    for (int i = 0; i < 4; i++) prog[8 + i] = steps[i].word;

    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 1'b0;
    @(negedge clk) rst = 1'b0;
    repeat (8) @(negedge clk);   // the eight addi instructions

    for (int i = 0; i < 4; i++) begin
      #1;
      checks++;
      if (pc !== 32'(32 + 4 * i) || instr !== steps[i].word ||
          dut.u_rf.rs1 !== steps[i].rs1 || dut.u_rf.rs2 !== steps[i].rs2 ||
          dut.u_rf.rdata1 !== steps[i].v1 || dut.u_rf.rdata2 !== steps[i].v2 ||
          alu_control !== steps[i].op || reg_write !== 1'b1 ||
          write_reg !== steps[i].rd || write_data !== steps[i].wd) begin
        failures++;
        $display("FAIL step %0d: pc=%h instr=%h rs=%0d/%0d rd=%h/%h op=%0d wr=%0d wd=%h",
                 i, pc, instr, dut.u_rf.rs1, dut.u_rf.rs2, dut.u_rf.rdata1, dut.u_rf.rdata2,
                 alu_control, write_reg, write_data);
      end
      @(negedge clk);
    end
    // The results must be in the register file afterwards.
    checks++;
    if (dut.u_rf.regs[6] !== 32'h31 || dut.u_rf.regs[7] !== 32'hFFFF_FFFF ||
        dut.u_rf.regs[5] !== 32'h23 || dut.u_rf.regs[28] !== 32'h1) begin
      failures++;
      $display("FAIL final registers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
