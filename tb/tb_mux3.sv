// Self-checking testbench for mux3: random inputs, all four select codes
// (code 3 is expected to pick input 0).
module tb_mux3;
  logic [29:0] d0, d1, d2, y, exp_y;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  mux3 #(.WIDTH(30)) dut (.d0(d0), .d1(d1), .d2(d2), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = 30'($urandom); d1 = 30'($urandom); d2 = 30'($urandom); sel = 2'(i);
      exp_y = (sel == 2'd1) ? d1 : (sel == 2'd2) ? d2 : d0;
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%0d y=%h exp=%h", sel, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
