// tb_mux2: self-checking test of the two-input multiplexer.
module tb_mux2;
  logic [31:0] d0, d1, y;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      d0 = $urandom; d1 = $urandom; sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
