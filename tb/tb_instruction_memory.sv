// Self-checking testbench for the instruction memory: contents written
// through the memory array, then read back combinationally at every word
// address; byte offsets 1..3 and address bits above the memory are ignored.
module tb_instruction_memory;
  logic [31:0] addr, instr;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  instruction_memory #(.WORDS(256)) dut (.addr(addr), .instr(instr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      dut.mem[i] = model[i];
    end
    for (int i = 0; i < 1024; i++) begin
      addr = {$urandom} & 32'h0000_03ff;
      if (i % 3 == 0) addr = addr | 32'hf000_0000;
      #1;
      checks++;
      if (instr !== model[addr[9:2]]) begin
        failures++;
        $display("FAIL addr=%h instr=%h exp=%h", addr, instr, model[addr[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
