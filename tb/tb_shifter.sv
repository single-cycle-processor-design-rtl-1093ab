// Self-checking testbench for the shifter: SLL, SRL, SRA and ROR on random
// data for every shift amount, against plain SystemVerilog shift operators.
module tb_shifter;
  import mips_pkg::*;
  logic [31:0] data, data_out, exp_v;
  logic [4:0]  sa;
  logic [1:0]  shift_op;
  logic        sll;
  int checks = 0, failures = 0;

  shifter dut (.data(data), .sa(sa), .shift_op(shift_op), .sll(sll), .data_out(data_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      for (int a = 0; a < 32; a++) begin
        for (int k = 0; k < 4; k++) begin
          data = (r == 0) ? 32'h8000_0001 : $urandom;
          sa   = 5'(a);
          case (k)
            0: begin shift_op = SH_LOGICAL; sll = 1; exp_v = data << a; end
            1: begin shift_op = SH_LOGICAL; sll = 0; exp_v = data >> a; end
            2: begin shift_op = SH_SRA;     sll = 0; exp_v = 32'($signed(data) >>> a); end
            default: begin shift_op = SH_ROR; sll = 0; exp_v = (data >> a) | (data << (32 - a)); end
          endcase
          #1;
          checks++;
          if (data_out !== exp_v) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d data=%h sa=%0d out=%h exp=%h", k, data, sa, data_out, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
