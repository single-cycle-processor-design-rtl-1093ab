// Self-checking testbench for mux2: random inputs, both select values.
module tb_mux2;
  logic [31:0] d0, d1, y;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = $urandom; d1 = $urandom; sel = i[0];
      #1;
      checks++;
      if (y !== (i[0] ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
