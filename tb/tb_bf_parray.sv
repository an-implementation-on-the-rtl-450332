// tb_bf_parray: writes random subkeys into all 18 P-array entries, reads
// them back, checks that writes at addresses 18..31 change nothing and read
// as 0, and that we low never writes.
module tb_bf_parray;
  import bf_pkg::*;
  logic    clk = 0, we = 0;
  p_addr_t address = '0;
  word_t   data_in = '0, data_out;
  word_t   model [18];
  int checks = 0, failures = 0;

  bf_parray dut (.clk, .we, .address, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < 32; i++) begin
      address = p_addr_t'(i);
      #1;
      checks++;
      if (data_out !== ((i < 18) ? model[i] : 32'h0)) begin
        failures++;
        $display("FAIL P[%0d] got %h", i, data_out);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 18; i++) begin
      model[i] = $urandom;
      we = 1; address = p_addr_t'(i); data_in = model[i];
      @(negedge clk);
    end
    for (int i = 18; i < 32; i++) begin
      we = 1; address = p_addr_t'(i); data_in = $urandom;
      @(negedge clk);
    end
    we = 0;
    read_all();
    for (int i = 0; i < 50; i++) begin
      address = p_addr_t'($urandom); data_in = $urandom;
      @(negedge clk);
    end
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
