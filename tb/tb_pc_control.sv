// Self-checking testbench for PC control: the PC control truth table for
// BEQ, BNE, J and other instructions with both values of the zero flag.
module tb_pc_control;
  logic       beq, bne, j, zero;
  logic [1:0] pc_src;
  int checks = 0, failures = 0;

  pc_control dut (.beq(beq), .bne(bne), .j(j), .zero(zero), .pc_src(pc_src));

  task automatic check(input logic b_eq, input logic b_ne, input logic jmp, input logic z,
                       input logic [1:0] e, input string name);
    beq = b_eq; bne = b_ne; j = jmp; zero = z;
    #1;
    checks++;
    if (pc_src !== e) begin
      failures++;
      $display("FAIL %s zero=%0d pc_src=%0d exp=%0d", name, z, pc_src, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0, 0, 2'd0, "other");
    check(0, 0, 0, 1, 2'd0, "other");
    check(0, 0, 1, 0, 2'd1, "J");
    check(0, 0, 1, 1, 2'd1, "J");
    check(1, 0, 0, 0, 2'd0, "BEQ");
    check(1, 0, 0, 1, 2'd2, "BEQ");
    check(0, 1, 0, 0, 2'd2, "BNE");
    check(0, 1, 0, 1, 2'd0, "BNE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
