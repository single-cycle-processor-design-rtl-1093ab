// Self-checking testbench for the immediate extender: every 16-bit value
// with sign and zero extension.
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32, exp_v;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      for (int e = 0; e < 2; e++) begin
        imm16 = 16'(v); ext_op = e[0];
        exp_v = e[0] ? 32'($signed(imm16)) : {16'h0000, imm16};
        #1;
        checks++;
        if (imm32 !== exp_v) begin
          failures++;
          $display("FAIL imm16=%h ext_op=%0d imm32=%h exp=%h", imm16, ext_op, imm32, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
