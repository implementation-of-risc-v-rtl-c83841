// tb_reg_file: self-checking test of the 32 x 32 register file.
//
// Random writes and reads against a model: checks both combinational read
// ports, that x0 stays zero when written, that a write is seen only after the
// clock edge, that we = 0 writes nothing and that reset clears every register.
module tb_reg_file;
  logic        clk = 1'b0, rst, we;
  logic [4:0]  rs1, rs2, rd;
  logic [31:0] wdata, rdata1, rdata2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst(rst), .rs1(rs1), .rs2(rs2), .rd(rd), .we(we), .wdata(wdata),
                .rdata1(rdata1), .rdata2(rdata2));

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      rs1 = 5'(r); rs2 = 5'(31 - r);
      #1;
      checks++;
      if (rdata1 !== model[r] || rdata2 !== model[31 - r]) begin
        failures++;
        $display("FAIL x%0d=%h/%h exp %h/%h", r, rdata1, rdata2, model[r], model[31 - r]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b1; rd = 5'd3; wdata = 32'hDEAD_BEEF; rs1 = '0; rs2 = '0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0; we = 1'b0;
    check_reads();
    repeat (1000) begin
      @(negedge clk);
      we = 1'($urandom); rd = 5'($urandom); wdata = $urandom;
      rs1 = rd; rs2 = 5'($urandom);
      #1;
      // Before the edge the old value must still be read.
      checks++;
      if (rdata1 !== model[rs1] || rdata2 !== model[rs2]) begin
        failures++;
        $display("FAIL pre-edge rs1=%0d %h exp %h", rs1, rdata1, model[rs1]);
      end
      @(posedge clk);
      if (we && rd != 0) model[rd] = wdata;
      #1;
      checks++;
      if (rdata1 !== model[rs1]) begin
        failures++;
        $display("FAIL post-edge x%0d=%h exp %h", rs1, rdata1, model[rs1]);
      end
    end
    @(negedge clk) we = 1'b0;
    check_reads();
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
