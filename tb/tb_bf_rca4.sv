// tb_bf_rca4: exhaustive check of the 4-bit ripple-carry adder, all 512
// combinations of a, b and carry-in against integer addition.
module tb_bf_rca4;
  logic [3:0] a, b, s;
  logic       c, co;
  int checks = 0, failures = 0;

  bf_rca4 dut (.c, .a, .b, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c, a, b} = 9'(i);
      #1;
      checks++;
      if ({co, s} !== 5'(a) + 5'(b) + 5'(c)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%b got %b_%h", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
