// Self-checking testbench for the write-enabled register: the output
// changes only at a rising edge with we = 1, and reset loads RESET_VALUE.
module tb_register;
  logic        clk = 0, rst, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  register #(.N(32), .RESET_VALUE(32'hA5A5_0001)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    model = 32'hA5A5_0001;
    checks++; if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      d = $urandom; we = ($urandom % 2) == 1;
      #2;
      // no change between edges
      checks++; if (q !== model) begin failures++; $display("FAIL q changed before edge"); end
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d we=%0d q=%h exp=%h", i, we, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
