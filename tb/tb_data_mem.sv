// tb_data_mem: self-checking test of the data memory.
//
// Random aligned byte, half-word and word stores and loads (signed and
// unsigned) against a byte-array model in little-endian order. A store must
// change only its own bytes; a load must return data in the same cycle. Uses
// a 1 KiB memory to keep the run short.
module tb_data_mem;
  localparam int unsigned BYTES = 1024;
  logic        clk = 1'b0, we;
  logic [2:0]  funct3;
  logic [31:0] addr, wdata, rdata;
  logic [7:0]  model [BYTES];
  int checks = 0, failures = 0;

  data_mem #(.BYTES(BYTES)) dut (.clk(clk), .we(we), .funct3(funct3), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_load(input logic [2:0] f3, input int unsigned a);
    case (f3)
      3'b000:  return {{24{model[a][7]}}, model[a]};
      3'b001:  return {{16{model[a+1][7]}}, model[a+1], model[a]};
      3'b100:  return {24'b0, model[a]};
      3'b101:  return {16'b0, model[a+1], model[a]};
      default: return {model[a+3], model[a+2], model[a+1], model[a]};
    endcase
  endfunction

  task automatic do_store(input logic [2:0] f3, input int unsigned a, input logic [31:0] d);
    @(negedge clk);
    we = 1'b1; funct3 = f3; addr = a; wdata = d;
    @(posedge clk);
    model[a] = d[7:0];
    if (f3 != 3'b000) model[a+1] = d[15:8];
    if (f3 == 3'b010) begin model[a+2] = d[23:16]; model[a+3] = d[31:24]; end
    #1 we = 1'b0;
  endtask

  task automatic do_load(input logic [2:0] f3, input int unsigned a);
    logic [31:0] exp;
    @(negedge clk);
    we = 1'b0; funct3 = f3; addr = a;
    #1;
    exp = ref_load(f3, a);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL load f3=%0d addr=%h rdata=%h exp=%h", f3, a, rdata, exp);
    end
  endtask

  function automatic int unsigned aligned(input logic [2:0] f3);
    int unsigned a;
    a = $urandom % BYTES;
    case (f3[1:0])
      2'b00:   return a;
      2'b01:   return a & ~32'd1;
      default: return a & ~32'd3;
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ld [5];
    logic [2:0] st [3];
    ld = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
    st = '{3'b000, 3'b001, 3'b010};
    we = 1'b0; funct3 = 3'b010; addr = '0; wdata = '0;
    // Initialise every word so the model and the memory agree.
    for (int a = 0; a < BYTES; a += 4) do_store(3'b010, a, $urandom);
    repeat (3000) begin
      if ($urandom % 2) begin
        logic [2:0] f;
        f = st[$urandom % 3];
        do_store(f, aligned(f), $urandom);
      end else begin
        logic [2:0] f;
        f = ld[$urandom % 5];
        do_load(f, aligned(f));
      end
    end
    for (int a = 0; a < BYTES; a += 4) do_load(3'b010, a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
