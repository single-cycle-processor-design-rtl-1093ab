// Self-checking testbench for the register file: random writes and reads
// against a model array; R0 always reads 0; a write shows only after the
// clock edge; reg_write = 0 writes nothing.
module tb_register_file;
  logic        clk = 0;
  logic [4:0]  ra, rb, rw;
  logic        reg_write;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .ra(ra), .rb(rb), .rw(rw), .reg_write(reg_write),
                     .bus_w(bus_w), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks += 2;
    if (bus_a !== model[ra]) begin failures++; $display("FAIL ra=%0d bus_a=%h exp=%h", ra, bus_a, model[ra]); end
    if (bus_b !== model[rb]) begin failures++; $display("FAIL rb=%0d bus_b=%h exp=%h", rb, bus_b, model[rb]); end
  endtask

  initial begin
    // fill every register, including an attempt on R0
    reg_write = 1;
    for (int r = 0; r < 32; r++) begin
      rw = 5'(r); bus_w = $urandom | 32'h1;
      @(posedge clk); #1;
      model[r] = (r == 0) ? 32'h0 : bus_w;
    end
    for (int i = 0; i < 2000; i++) begin
      ra = 5'($urandom); rb = 5'($urandom);
      rw = 5'($urandom); bus_w = $urandom; reg_write = ($urandom % 3) != 0;
      if (i % 50 == 0) rw = 5'd0;
      if (i % 7 == 0) ra = rw;   // read the register being written
      check_reads();             // old value before the edge
      @(posedge clk); #1;
      if (reg_write && rw != 0) model[rw] = bus_w;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
