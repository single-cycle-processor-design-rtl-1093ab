// Self-checking testbench for the next-PC logic: PC + 4, jump target
// {PC[31:28], imm26, 00} and branch target PC + 4 + 4 * offset, on random
// PCs and offsets of both signs.
module tb_next_pc_logic;
  logic [31:0] pc, imm32, exp_pc;
  logic [25:0] imm26;
  logic [1:0]  pc_src;
  logic [29:0] next_pc;
  int checks = 0, failures = 0;

  next_pc_logic dut (.pc(pc), .imm26(imm26), .imm32(imm32), .pc_src(pc_src), .next_pc(next_pc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] off;
      pc    = $urandom & 32'hffff_fffc;
      imm26 = 26'($urandom);
      off   = 16'($urandom);
      imm32 = 32'($signed(off));
      pc_src = 2'(i);
      case (pc_src)
        2'd1:    exp_pc = {pc[31:28], imm26, 2'b00};
        2'd2:    exp_pc = pc + 32'd4 + (imm32 << 2);
        default: exp_pc = pc + 32'd4;
      endcase
      #1;
      checks++;
      if ({next_pc, 2'b00} !== exp_pc) begin
        failures++;
        $display("FAIL pc=%h src=%0d next=%h exp=%h", pc, pc_src, {next_pc, 2'b00}, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
