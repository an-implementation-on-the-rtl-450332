// tb_bf_add8: exhaustive check of the 8-bit carry-select adder, all 2**17
// combinations of a, b and carry-in against integer addition.
module tb_bf_add8;
  logic [7:0] a, b, s;
  logic       c, cout;
  int checks = 0, failures = 0;

  bf_add8 dut (.c, .a, .b, .s, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {c, a, b} = 17'(i);
      #1;
      checks++;
      if ({cout, s} !== 9'(a) + 9'(b) + 9'(c)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c=%b got %b_%h", a, b, c, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
