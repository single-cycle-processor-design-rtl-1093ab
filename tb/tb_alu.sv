// Self-checking testbench for the multifunction ALU: every operation code
// on random and corner operands; result, zero and overflow are compared
// with a reference written with SystemVerilog operators.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, result, exp_r;
  logic [3:0]  alu_op;
  logic        sll, zero, overflow, exp_ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  alu dut (.a(a), .b(b), .alu_op(alu_op), .sll(sll), .result(result), .zero(zero), .overflow(overflow));

  localparam logic [31:0] CORNER [8] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff,
                                         32'h8000_0000, 32'h8000_0001, 32'h0000_ffff, 32'h1234_5678};

  function automatic logic [32:0] ref_alu(input logic [3:0] code, input logic s,
                                          input logic [31:0] x, input logic [31:0] y);
    logic [31:0] r;
    logic        ov;
    longint      sx, sy, sres;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    ov = 1'b0;
    case (code)
      ALU_ADD: begin sres = sx + sy; r = x + y; ov = (sres > 64'sh7fffffff) || (sres < -64'sh80000000); end
      ALU_SUB: begin sres = sx - sy; r = x - y; ov = (sres > 64'sh7fffffff) || (sres < -64'sh80000000); end
      ALU_SLT: begin sres = sx - sy; r = (sx < sy) ? 32'd1 : 32'd0; ov = (sres > 64'sh7fffffff) || (sres < -64'sh80000000); end
      ALU_AND: r = x & y;
      ALU_OR:  r = x | y;
      ALU_XOR: r = x ^ y;
      ALU_NOR: r = ~(x | y);
      4'b0000: r = s ? (y << x[4:0]) : (y >> x[4:0]);
      4'b0001: r = 32'($signed(y) >>> x[4:0]);
      4'b0011: r = (y >> x[4:0]) | (y << (32 - x[4:0]));
      default: r = 'x;
    endcase
    return {ov, r};
  endfunction

  task automatic run_one(input logic [3:0] code, input logic s);
    logic [32:0] e;
    alu_op = code; sll = s;
    #1;
    e = ref_alu(code, s, a, b);
    exp_r = e[31:0];
    exp_ovf = e[32];
    checks++;
    if (result !== exp_r || zero !== (exp_r == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%b a=%h b=%h r=%h exp=%h zero=%0d", code, a, b, result, exp_r, zero);
    end
    // overflow is only meaningful for the adder operations
    if (code inside {ALU_ADD, ALU_SUB, ALU_SLT}) begin
      checks++;
      if (overflow !== exp_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL ovf op=%b a=%h b=%h ovf=%0d exp=%0d", code, a, b, overflow, exp_ovf);
      end
      if (exp_ovf) n_ovf++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] CODES [10] = '{ALU_ADD, ALU_SUB, ALU_SLT, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                                        4'b0000, 4'b0001, 4'b0011};

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a = CORNER[i]; b = CORNER[j];
        foreach (CODES[k]) run_one(CODES[k], 1'b0);
        run_one(4'b0000, 1'b1);
      end
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = (i % 5 == 0) ? a : $urandom;
      foreach (CODES[k]) run_one(CODES[k], 1'b0);
      run_one(4'b0000, 1'b1);
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
