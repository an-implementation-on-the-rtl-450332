// tb_bf_sbox: fills the 256 x 32 S-box with random words, reads every entry
// back, then checks that cycles with we low leave the contents alone and
// that a write to one entry touches no other.
module tb_bf_sbox;
  import bf_pkg::*;
  logic    clk = 0, we = 0;
  s_addr_t address = '0;
  word_t   data_in = '0, data_out;
  word_t   model [256];
  int checks = 0, failures = 0;

  bf_sbox dut (.clk, .we, .address, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < 256; i++) begin
      address = s_addr_t'(i);
      #1;
      checks++;
      if (data_out !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d got %h want %h", i, data_out, model[i]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      we = 1; address = s_addr_t'(i); data_in = model[i];
      @(negedge clk);
    end
    we = 0;
    read_all();
    // we low: random addresses and data must not write.
    for (int i = 0; i < 100; i++) begin
      address = s_addr_t'($urandom); data_in = $urandom;
      @(negedge clk);
    end
    read_all();
    @(negedge clk);
    // one more write, then everything again
    we = 1; address = 8'd77; data_in = 32'hDEAD_BEEF; model[77] = 32'hDEAD_BEEF;
    @(negedge clk);
    we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
