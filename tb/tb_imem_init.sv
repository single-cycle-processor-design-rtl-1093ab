// Testbench for loading the instruction memory from a hex file: the file
// tb/imem_init_test.hex holds 16 words, word i = 0x9E3779B9 * (i + 1)
// (mod 2^32); the testbench reads them back through the address port.
module tb_imem_init;
  logic [31:0] addr, instr, exp_v;
  int checks = 0, failures = 0;

  instruction_memory #(.WORDS(256), .INIT_FILE("tb/imem_init_test.hex")) dut (.addr(addr), .instr(instr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 16; i++) begin
      addr  = 32'(i * 4);
      exp_v = 32'h9E37_79B9 * 32'(i + 1);
      #1;
      checks++;
      if (instr !== exp_v) begin
        failures++;
        $display("FAIL word %0d instr=%h exp=%h", i, instr, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
