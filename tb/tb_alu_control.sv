// Self-checking testbench for ALU control: every row of the ALU control
// truth table, with random funct values for the I-type rows.
module tb_alu_control;
  import mips_pkg::*;
  op_dec_t    dec;
  logic [5:0] funct;
  logic [3:0] alu_op;
  int checks = 0, failures = 0;

  alu_control dut (.dec(dec), .funct(funct), .alu_op(alu_op));

  task automatic check(input op_dec_t d, input logic [5:0] f, input logic [3:0] e, input string name);
    dec = d; funct = f;
    #1;
    checks++;
    if (alu_op !== e) begin
      failures++;
      $display("FAIL %s funct=%h alu_op=%b exp=%b", name, f, alu_op, e);
    end
  endtask

  function automatic op_dec_t line(input int k);
    op_dec_t d = '0;
    case (k)
      0: d.rtype = 1;  1: d.addi = 1;  2: d.slti = 1;  3: d.andi = 1;
      4: d.ori = 1;    5: d.xori = 1;  6: d.lw = 1;    7: d.sw = 1;
      8: d.beq = 1;    9: d.bne = 1;   default: d.j = 1;
    endcase
    return d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(line(0), 6'h24, 4'b1100, "and");
    check(line(0), 6'h25, 4'b1101, "or");
    check(line(0), 6'h26, 4'b1110, "xor");
    check(line(0), 6'h20, 4'b1000, "add");
    check(line(0), 6'h22, 4'b1010, "sub");
    check(line(0), 6'h2a, 4'b0110, "slt");
    for (int i = 0; i < 20; i++) begin
      logic [5:0] f = 6'($urandom);
      check(line(1), f, 4'b1000, "addi");
      check(line(2), f, 4'b0110, "slti");
      check(line(3), f, 4'b1100, "andi");
      check(line(4), f, 4'b1101, "ori");
      check(line(5), f, 4'b1110, "xori");
      check(line(6), f, 4'b1000, "lw");
      check(line(7), f, 4'b1000, "sw");
      check(line(8), f, 4'b1010, "beq");
      check(line(9), f, 4'b1010, "bne");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
