// Self-checking testbench for the program counter: reset to 0, loads the
// next word address every edge, low two bits always 00.
module tb_pc_register;
  logic        clk = 0, rst;
  logic [29:0] next_pc;
  logic [31:0] pc, model;
  int checks = 0, failures = 0;

  pc_register dut (.clk(clk), .rst(rst), .next_pc(next_pc), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; next_pc = 30'h3fff_ffff;
    @(posedge clk); #1;
    checks++; if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      next_pc = 30'($urandom);
      model = {next_pc, 2'b00};
      @(posedge clk); #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%h exp=%h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
