// Self-checking testbench for the data memory: synchronous writes with
// mem_write, combinational reads with mem_read, output 0 when mem_read = 0,
// and no write without mem_write.
module tb_data_memory;
  logic        clk = 0;
  logic [31:0] addr, data_in, data_out;
  logic        mem_read, mem_write;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(256)) dut (.clk(clk), .addr(addr), .data_in(data_in), .mem_read(mem_read),
                                  .mem_write(mem_write), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 0;
    mem_write = 1;
    for (int i = 0; i < 256; i++) begin
      addr = 32'(i * 4); data_in = $urandom; model[i] = data_in;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      addr = {$urandom} & 32'h0000_03fc;
      data_in = $urandom;
      mem_write = ($urandom % 2) == 1;
      mem_read = ($urandom % 4) != 0;
      #1;
      checks++;
      if (data_out !== (mem_read ? model[addr[9:2]] : 32'h0)) begin
        failures++;
        $display("FAIL read addr=%h rd=%0d out=%h exp=%h", addr, mem_read, data_out, model[addr[9:2]]);
      end
      @(posedge clk); #1;
      if (mem_write) model[addr[9:2]] = data_in;
      mem_read = 1;
      #1;
      checks++;
      if (data_out !== model[addr[9:2]]) begin
        failures++;
        $display("FAIL after edge addr=%h out=%h exp=%h", addr, data_out, model[addr[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
