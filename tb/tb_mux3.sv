// tb_mux3: self-checking test of the three-input multiplexer, all four
// select codes (3 selects d0).
module tb_mux3;
  logic [31:0] d0, d1, d2, y, exp;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  mux3 #(.WIDTH(32)) dut (.d0(d0), .d1(d1), .d2(d2), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800) begin
      d0 = $urandom; d1 = $urandom; d2 = $urandom; sel = 2'($urandom);
      #1;
      exp = (sel == 2'd1) ? d1 : (sel == 2'd2) ? d2 : d0;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%0d y=%h exp=%h", sel, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
