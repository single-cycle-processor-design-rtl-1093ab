// Self-checking testbench for the tri-state buffer: two buffers share one
// bus with complementary enables, which must behave as a 2-input
// multiplexer (Data_0 when select = 0, Data_1 when select = 1).
module tb_tristate_buffer;
  logic [31:0] d0, d1;
  logic        sel;
  tri   [31:0] bus;
  int checks = 0, failures = 0;

  tristate_buffer #(.WIDTH(32)) u_b0 (.data_in(d0), .enable(~sel), .data_out(bus));
  tristate_buffer #(.WIDTH(32)) u_b1 (.data_in(d1), .enable(sel),  .data_out(bus));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      d0 = $urandom; d1 = $urandom; sel = i[0] ^ i[3];
      #1;
      checks++;
      if (bus !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%h d1=%h bus=%h", sel, d0, d1, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
