// tb_bf_add32: checks the proposed 32-bit adder against integer addition on
// carry-chain corner cases (every byte boundary with and without a rippling
// carry) and 200000 random operand pairs.
module tb_bf_add32;
  logic [31:0] a, b, s;
  logic        cout;
  int checks = 0, failures = 0;

  bf_add32 dut (.a, .b, .s, .cout);

  task automatic check(logic [31:0] x, logic [31:0] y);
    a = x; b = y;
    #1;
    checks++;
    if ({cout, s} !== 33'(x) + 33'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h got %b_%h", x, y, cout, s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h0);
    check(32'hFFFF_FFFF, 32'h1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int k = 0; k < 32; k++) begin
      check((32'h1 << k) - 1, 32'h1);           // carry rippling up to bit k
      check(32'hFFFF_FFFF >> k, 32'h1 << 0);
      check(32'h1 << k, 32'h1 << k);
    end
    for (int k = 1; k < 4; k++) begin
      check(32'hFF << (8*(k-1)), 32'h1 << (8*(k-1)));   // carry into byte k
      check(32'h7F << (8*(k-1)), 32'h1 << (8*(k-1)));   // no carry into byte k
    end
    for (int i = 0; i < 200000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
