// tb_bf_mux: checks the 2:1 mux at widths 8 and 1 with random inputs and
// both select values (c = sel ? b : a).
module tb_bf_mux;
  logic       sel;
  logic [7:0] a8, b8, c8;
  logic       a1, b1, c1;
  int checks = 0, failures = 0;

  bf_mux #(.WIDTH(8)) dut8 (.sel, .a(a8), .b(b8), .c(c8));
  bf_mux #(.WIDTH(1)) dut1 (.sel, .a(a1), .b(b1), .c(c1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      {a8, b8} = 16'($urandom);
      {a1, b1} = 2'($urandom);
      sel = i[0];
      #1;
      checks += 2;
      if (c8 !== (sel ? b8 : a8)) begin failures++; $display("FAIL w8 sel=%b a=%h b=%h c=%h", sel, a8, b8, c8); end
      if (c1 !== (sel ? b1 : a1)) begin failures++; $display("FAIL w1 sel=%b a=%b b=%b c=%b", sel, a1, b1, c1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
