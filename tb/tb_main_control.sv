// Self-checking testbench for main control: every opcode of the subset is
// compared with the control truth table (don't-care entries skipped), and
// every other opcode must write neither registers nor memory.
module tb_main_control;
  import mips_pkg::*;
  logic [5:0] op;
  main_ctrl_t ctrl;
  op_dec_t    dec;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .ctrl(ctrl), .dec(dec));

  // expected values per signal: 0, 1 or 2 (= don't care)
  // order: RegDst RegWr ExtOp ALUSrc MemRd MemWr WBdata
  typedef int row_t [7];

  task automatic check_row(input logic [5:0] code, input row_t e, input string name);
    logic got [7];
    op = code;
    #1;
    got = '{ctrl.reg_dst, ctrl.reg_wr, ctrl.ext_op, ctrl.alu_src, ctrl.mem_rd, ctrl.mem_wr, ctrl.wb_data};
    for (int k = 0; k < 7; k++) begin
      if (e[k] == 2) continue;
      checks++;
      if (got[k] !== e[k][0]) begin
        failures++;
        $display("FAIL %s signal %0d got %0d exp %0d", name, k, got[k], e[k]);
      end
    end
    checks++;
    if ($countones(dec) != 1) begin failures++; $display("FAIL %s decoder lines %b", name, dec); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_row(6'h00, '{1, 1, 2, 0, 0, 0, 0}, "R-type");
    check_row(6'h08, '{0, 1, 1, 1, 0, 0, 0}, "ADDI");
    check_row(6'h0a, '{0, 1, 1, 1, 0, 0, 0}, "SLTI");
    check_row(6'h0c, '{0, 1, 0, 1, 0, 0, 0}, "ANDI");
    check_row(6'h0d, '{0, 1, 0, 1, 0, 0, 0}, "ORI");
    check_row(6'h0e, '{0, 1, 0, 1, 0, 0, 0}, "XORI");
    check_row(6'h23, '{0, 1, 1, 1, 1, 0, 1}, "LW");
    check_row(6'h2b, '{2, 0, 1, 1, 0, 1, 2}, "SW");
    check_row(6'h04, '{2, 0, 1, 0, 0, 0, 2}, "BEQ");
    check_row(6'h05, '{2, 0, 1, 0, 0, 0, 2}, "BNE");
    check_row(6'h02, '{2, 0, 2, 2, 0, 0, 2}, "J");
    // specific decoder lines
    op = 6'h04; #1; checks++; if (!dec.beq) begin failures++; $display("FAIL beq line"); end
    op = 6'h05; #1; checks++; if (!dec.bne) begin failures++; $display("FAIL bne line"); end
    op = 6'h02; #1; checks++; if (!dec.j)   begin failures++; $display("FAIL j line"); end
    op = 6'h00; #1; checks++; if (!dec.rtype) begin failures++; $display("FAIL rtype line"); end
    // opcodes outside the subset
    for (int c = 0; c < 64; c++) begin
      if (c inside {'h00, 'h02, 'h04, 'h05, 'h08, 'h0a, 'h0c, 'h0d, 'h0e, 'h23, 'h2b}) continue;
      op = 6'(c);
      #1;
      checks++;
      if (ctrl.reg_wr || ctrl.mem_wr || dec != '0) begin
        failures++;
        $display("FAIL unknown op %h reg_wr=%0d mem_wr=%0d dec=%b", op, ctrl.reg_wr, ctrl.mem_wr, dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
