// End-to-end testbench for the single-cycle processor at its default
// parameters.
//
// A small program is assembled here into the instruction memory. It
// stores a 10-element sequence with a bne loop, sums it back with lw, add,
// beq and j, exercises every remaining instruction of the subset,
// overflows the adder in a doubling loop, writes to R0, and ends in a
// self-jump. An instruction-level reference model, written independently
// of the RTL, runs alongside: after each clock edge the PC, all registers
// and (at the end) the data memory of the processor are compared with it.
// One instruction must retire per clock cycle. Each mechanism (every
// instruction type, branch taken and not taken for beq and bne, jump,
// overflow, write to R0) is counted and must happen at least once.
module tb_single_cycle_cpu;
  logic        clk = 0, rst;
  logic [31:0] pc, instr;
  logic        alu_overflow;
  int checks = 0, failures = 0;

  single_cycle_cpu dut (.clk(clk), .rst(rst), .pc(pc), .instr(instr), .alu_overflow(alu_overflow));

  always #5 clk = ~clk;

  // ---------------- tiny assembler ----------------
  function automatic logic [31:0] R(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] opc, input int rt, input int rs, input int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] JMP(input int word_addr);
    return {6'h02, 26'(word_addr)};
  endfunction

  logic [31:0] prog [$];

  // ---------------- reference model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [256];

  // mechanism counters
  int n_op [string];
  int n_beq_taken = 0, n_beq_not = 0, n_bne_taken = 0, n_bne_not = 0;
  int n_ovf = 0, n_r0_write = 0;

  function automatic bit ovf_add(input logic [31:0] x, input logic [31:0] y, input logic [31:0] s);
    return (x[31] == y[31]) && (s[31] != x[31]);
  endfunction

  // executes the instruction at m_pc, updates the model state and returns
  // the expected overflow flag
  function automatic bit model_step();
    logic [31:0] ins, a, b, simm, zimm, res, nxt;
    logic [5:0]  o, f;
    int          rs, rt, rd;
    bit          ov;
    ins  = m_mem_i(m_pc);
    o    = ins[31:26]; f = ins[5:0];
    rs   = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a    = m_reg[rs]; b = m_reg[rt];
    simm = {{16{ins[15]}}, ins[15:0]};
    zimm = {16'h0, ins[15:0]};
    nxt  = m_pc + 4;
    ov   = 0;
    case (o)
      6'h00: begin
        case (f)
          6'h20: begin res = a + b; ov = ovf_add(a, b, res); n_op["add"]++; end
          6'h22: begin res = a - b; ov = ovf_add(a, ~b, res); n_op["sub"]++; end
          6'h24: begin res = a & b; n_op["and"]++; end
          6'h25: begin res = a | b; n_op["or"]++; end
          6'h26: begin res = a ^ b; n_op["xor"]++; end
          6'h2a: begin res = ($signed(a) < $signed(b)) ? 1 : 0; n_op["slt"]++; end
          default: res = 'x;
        endcase
        if (rd == 0) n_r0_write++; else m_reg[rd] = res;
      end
      6'h08: begin res = a + simm; ov = ovf_add(a, simm, res); n_op["addi"]++;
                   if (rt == 0) n_r0_write++; else m_reg[rt] = res; end
      6'h0a: begin res = ($signed(a) < $signed(simm)) ? 1 : 0; n_op["slti"]++;
                   if (rt == 0) n_r0_write++; else m_reg[rt] = res; end
      6'h0c: begin res = a & zimm; n_op["andi"]++; if (rt == 0) n_r0_write++; else m_reg[rt] = res; end
      6'h0d: begin res = a | zimm; n_op["ori"]++;  if (rt == 0) n_r0_write++; else m_reg[rt] = res; end
      6'h0e: begin res = a ^ zimm; n_op["xori"]++; if (rt == 0) n_r0_write++; else m_reg[rt] = res; end
      6'h23: begin res = m_mem[8'((a + simm) >> 2)]; n_op["lw"]++;
                   if (rt == 0) n_r0_write++; else m_reg[rt] = res; end
      6'h2b: begin m_mem[8'((a + simm) >> 2)] = b; n_op["sw"]++; end
      6'h04: begin n_op["beq"]++;
                   if (a == b) begin nxt = m_pc + 4 + (simm << 2); n_beq_taken++; end else n_beq_not++; end
      6'h05: begin n_op["bne"]++;
                   if (a != b) begin nxt = m_pc + 4 + (simm << 2); n_bne_taken++; end else n_bne_not++; end
      6'h02: begin nxt = {m_pc[31:28], ins[25:0], 2'b00}; n_op["j"]++; end
      default: ;
    endcase
    m_pc = nxt;
    return ov;
  endfunction

  function automatic logic [31:0] m_mem_i(input logic [31:0] addr);
    int idx = int'(addr[9:2]);
    return (idx < prog.size()) ? prog[idx] : 32'h0;
  endfunction

  // ---------------- the program ----------------
  task automatic build_program();
    // store loop: mem[i] = 1 + 3*i for i = 0..9
    prog.push_back(I(6'h08, 1, 0, 10));        //  0 addi r1, r0, 10
    prog.push_back(I(6'h08, 2, 0, 0));         //  1 addi r2, r0, 0
    prog.push_back(I(6'h08, 3, 0, 1));         //  2 addi r3, r0, 1
    prog.push_back(I(6'h2b, 3, 2, 0));         //  3 sw   r3, 0(r2)
    prog.push_back(I(6'h08, 3, 3, 3));         //  4 addi r3, r3, 3
    prog.push_back(I(6'h08, 2, 2, 4));         //  5 addi r2, r2, 4
    prog.push_back(I(6'h08, 1, 1, -1));        //  6 addi r1, r1, -1
    prog.push_back(I(6'h05, 0, 1, -5));        //  7 bne  r1, r0, 3
    // load-and-sum loop
    prog.push_back(I(6'h08, 2, 0, 0));         //  8 addi r2, r0, 0
    prog.push_back(I(6'h08, 4, 0, 0));         //  9 addi r4, r0, 0
    prog.push_back(I(6'h08, 1, 0, 10));        // 10 addi r1, r0, 10
    prog.push_back(I(6'h23, 5, 2, 0));         // 11 lw   r5, 0(r2)
    prog.push_back(R(6'h20, 4, 4, 5));         // 12 add  r4, r4, r5
    prog.push_back(I(6'h08, 2, 2, 4));         // 13 addi r2, r2, 4
    prog.push_back(I(6'h08, 1, 1, -1));        // 14 addi r1, r1, -1
    prog.push_back(I(6'h04, 0, 1, 1));         // 15 beq  r1, r0, 17
    prog.push_back(JMP(11));                   // 16 j    11
    prog.push_back(I(6'h2b, 4, 0, 100));       // 17 sw   r4, 100(r0)
    // the remaining ALU instructions
    prog.push_back(R(6'h22, 6, 0, 4));         // 18 sub  r6, r0, r4
    prog.push_back(R(6'h2a, 7, 6, 4));         // 19 slt  r7, r6, r4
    prog.push_back(I(6'h0a, 8, 4, 5));         // 20 slti r8, r4, 5
    prog.push_back(I(6'h0c, 9, 6, 'hff00));    // 21 andi r9, r6, 0xff00
    prog.push_back(I(6'h0d, 10, 0, 'h8001));   // 22 ori  r10, r0, 0x8001
    prog.push_back(I(6'h0e, 11, 10, 'hffff));  // 23 xori r11, r10, 0xffff
    prog.push_back(R(6'h24, 12, 6, 10));       // 24 and  r12, r6, r10
    prog.push_back(R(6'h25, 13, 6, 10));       // 25 or   r13, r6, r10
    prog.push_back(R(6'h26, 14, 6, 10));       // 26 xor  r14, r6, r10
    prog.push_back(I(6'h0a, 15, 6, -1));       // 27 slti r15, r6, -1
    prog.push_back(I(6'h04, 7, 8, 5));         // 28 beq  r8, r7, +5 (not taken)
    prog.push_back(I(6'h05, 7, 7, 5));         // 29 bne  r7, r7, +5 (not taken)
    // doubling loop: r17 = 1 << 31, overflows on the last doubling
    prog.push_back(I(6'h0d, 17, 0, 1));        // 30 ori  r17, r0, 1
    prog.push_back(I(6'h08, 18, 0, 31));       // 31 addi r18, r0, 31
    prog.push_back(R(6'h20, 17, 17, 17));      // 32 add  r17, r17, r17
    prog.push_back(I(6'h08, 18, 18, -1));      // 33 addi r18, r18, -1
    prog.push_back(I(6'h05, 0, 18, -3));       // 34 bne  r18, r0, 32
    prog.push_back(R(6'h20, 0, 17, 17));       // 35 add  r0, r17, r17 (discarded, overflows)
    prog.push_back(I(6'h08, 0, 0, 77));        // 36 addi r0, r0, 77 (discarded)
    prog.push_back(I(6'h23, 19, 0, 100));      // 37 lw   r19, 100(r0)
    prog.push_back(R(6'h22, 20, 17, 18));      // 38 sub  r20, r17, r18
    prog.push_back(R(6'h20, 21, 19, 0));       // 39 add  r21, r19, r0
    prog.push_back(I(6'h04, 0, 0, 1));         // 40 beq  r0, r0, 42 (taken)
    prog.push_back(I(6'h08, 22, 0, 1));        // 41 addi r22, r0, 1 (skipped)
    prog.push_back(I(6'h2b, 21, 0, 104));      // 42 sw   r21, 104(r0)
    prog.push_back(JMP(43));                   // 43 j    43 (halt)
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ovf;
    int cycles;
    build_program();
    for (int i = 0; i < 256; i++) begin
      dut.u_imem.mem[i] = (i < prog.size()) ? prog[i] : 32'h0;
      dut.u_dmem.mem[i] = 32'h0;
      m_mem[i] = 32'h0;
    end
    for (int r = 0; r < 32; r++) m_reg[r] = 32'h0;
    for (int r = 1; r < 32; r++) dut.u_regfile.regs[r] = 32'h0;
    m_pc = 32'h0;

    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end

    cycles = 0;
    while (m_pc != 32'(43 * 4) && cycles < 2000) begin
      checks++;
      if (instr !== m_mem_i(m_pc)) begin
        failures++; $display("FAIL fetch pc=%h instr=%h", pc, instr);
      end
      exp_ovf = model_step();
      if (exp_ovf) n_ovf++;
      checks++;
      if (alu_overflow !== exp_ovf) begin
        failures++; $display("FAIL overflow at pc=%h got %0d exp %0d", pc, alu_overflow, exp_ovf);
      end
      @(posedge clk); #1;
      cycles++;
      // one instruction per cycle: the PC and all registers match after each edge
      checks++;
      if (pc !== m_pc) begin
        failures++; $display("FAIL cycle %0d pc=%h exp=%h", cycles, pc, m_pc);
      end
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (dut.u_regfile.regs[r] !== m_reg[r]) begin
          failures++;
          $display("FAIL cycle %0d r%0d=%h exp=%h", cycles, r, dut.u_regfile.regs[r], m_reg[r]);
        end
      end
    end
    // the halt loop keeps the PC in place
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pc !== 32'(43 * 4)) begin failures++; $display("FAIL halt pc=%h", pc); end

    for (int i = 0; i < 256; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== m_mem[i]) begin
        failures++; $display("FAIL mem[%0d]=%h exp=%h", i, dut.u_dmem.mem[i], m_mem[i]);
      end
    end
    // known results: sum of 1 + 3i for i = 0..9 is 145
    checks += 3;
    if (dut.u_dmem.mem[25] !== 32'd145) begin failures++; $display("FAIL sum %0d", dut.u_dmem.mem[25]); end
    if (dut.u_dmem.mem[26] !== 32'd145) begin failures++; $display("FAIL copy %0d", dut.u_dmem.mem[26]); end
    if (dut.u_regfile.regs[17] !== 32'h8000_0000) begin failures++; $display("FAIL r17"); end
    // cycle count: 1 instruction per cycle -> cycles equals retired instructions
    begin
      int retired = 0;
      foreach (n_op[k]) retired += n_op[k];
      checks++;
      if (cycles != retired) begin failures++; $display("FAIL cycles %0d retired %0d", cycles, retired); end
      $display("retired %0d instructions in %0d cycles", retired, cycles);
    end

    // every mechanism happened at least once
    foreach (n_op[k]) $display("  %-5s x %0d", k, n_op[k]);
    $display("  beq taken %0d not %0d, bne taken %0d not %0d, j %0d, overflow %0d, R0 writes %0d",
             n_beq_taken, n_beq_not, n_bne_taken, n_bne_not, n_op["j"], n_ovf, n_r0_write);
    begin
      string names [16] = '{"add", "sub", "and", "or", "xor", "slt", "addi", "slti", "andi",
                            "ori", "xori", "lw", "sw", "beq", "bne", "j"};
      foreach (names[k]) begin
        checks++;
        if (!n_op.exists(names[k]) || n_op[names[k]] == 0) begin
          failures++; $display("FAIL instruction %s never executed", names[k]);
        end
      end
      checks += 6;
      if (n_beq_taken == 0) begin failures++; $display("FAIL no beq taken"); end
      if (n_beq_not == 0)   begin failures++; $display("FAIL no beq not taken"); end
      if (n_bne_taken == 0) begin failures++; $display("FAIL no bne taken"); end
      if (n_bne_not == 0)   begin failures++; $display("FAIL no bne not taken"); end
      if (n_ovf == 0)       begin failures++; $display("FAIL no overflow"); end
      if (n_r0_write == 0)  begin failures++; $display("FAIL no write to R0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
