// Single-cycle processor for a MIPS integer subset.
//
// Every instruction completes in one clock cycle: in the same cycle the
// PC addresses the instruction memory, the register file is read, the ALU
// computes, the data memory is read or written and the result and the
// next PC are ready for the next rising edge, which updates the PC, the
// destination register and the data memory together.
//
// Supported: add, sub, and, or, xor, slt (R-type); addi, slti, andi, ori,
// xori; lw, sw; beq, bne; j.
//
// Datapath (mux input 0 / 1 in brackets):
//   PC -> instruction memory -> Rs (RA), Rt (RB), Rd
//   RegDst mux  [Rt / Rd]            -> RW
//   extender    Imm16 -> 32 bits, sign or zero by ExtOp
//   ALUSrc mux  [BusB / extended]    -> ALU B, BusA -> ALU A
//   ALU result  -> data memory address, BusB -> data memory data in
//   WBdata mux  [ALU result / Data_out] -> BusW
//   PCSrc mux   [PC+4 / jump target / branch target] -> PC
// Control: main control (opcode), ALU control (decoded opcode, funct),
// PC control (BEQ, BNE, J, ALU zero).
//
// Ports: clk, synchronous active-high rst (PC = 0), and for observation
// the current pc, instr and the ALU overflow flag (the subset raises no
// exception on overflow). Memory sizes IMEM_WORDS / DMEM_WORDS and the
// reset address are choices of this design. The program is loaded into
// the instruction memory from the hex file IMEM_INIT (one word per line)
// or, in simulation, by writing u_imem.mem directly; with neither, the
// instruction memory is empty and synthesis removes it.
//
// The datapath and control follow the COE 301 single-cycle processor; the
// items named as choices above are this design's own.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int    IMEM_WORDS = 256,
  parameter int    DMEM_WORDS = 256,
  parameter string IMEM_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        alu_overflow
);
  // instruction fields
  logic [5:0]  op, funct;
  logic [4:0]  rs, rt, rd;
  logic [15:0] imm16;
  logic [25:0] imm26;

  main_ctrl_t  ctrl;
  op_dec_t     dec;
  logic [3:0]  alu_op;
  logic [1:0]  pc_src;

  logic [29:0] next_pc;
  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] imm32, alu_b, alu_result, mem_data;
  logic        zero;

  // ---------------- fetch ----------------
  pc_register u_pc (
    .clk     (clk),
    .rst     (rst),
    .next_pc (next_pc),
    .pc      (pc)
  );

  instruction_memory #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .addr  (pc),
    .instr (instr)
  );

  assign op    = instr[31:26];
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign imm16 = instr[15:0];
  assign funct = instr[5:0];
  assign imm26 = instr[25:0];

  // ---------------- control ----------------
  main_control u_main_ctrl (
    .op   (op),
    .ctrl (ctrl),
    .dec  (dec)
  );

  alu_control u_alu_ctrl (
    .dec    (dec),
    .funct  (funct),
    .alu_op (alu_op)
  );

  pc_control u_pc_ctrl (
    .beq    (dec.beq),
    .bne    (dec.bne),
    .j      (dec.j),
    .zero   (zero),
    .pc_src (pc_src)
  );

  // ---------------- register read ----------------
  mux2 #(.WIDTH(5)) u_regdst_mux (
    .d0  (rt),
    .d1  (rd),
    .sel (ctrl.reg_dst),
    .y   (rw)
  );

  register_file u_regfile (
    .clk       (clk),
    .ra        (rs),
    .rb        (rt),
    .rw        (rw),
    .reg_write (ctrl.reg_wr),
    .bus_w     (bus_w),
    .bus_a     (bus_a),
    .bus_b     (bus_b)
  );

  extender u_ext (
    .imm16  (imm16),
    .ext_op (ctrl.ext_op),
    .imm32  (imm32)
  );

  // ---------------- execute ----------------
  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .d0  (bus_b),
    .d1  (imm32),
    .sel (ctrl.alu_src),
    .y   (alu_b)
  );

  // the subset has no shift instructions, so the SLL line is inactive
  alu u_alu (
    .a        (bus_a),
    .b        (alu_b),
    .alu_op   (alu_op),
    .sll      (1'b0),
    .result   (alu_result),
    .zero     (zero),
    .overflow (alu_overflow)
  );

  // ---------------- memory ----------------
  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk       (clk),
    .addr      (alu_result),
    .data_in   (bus_b),
    .mem_read  (ctrl.mem_rd),
    .mem_write (ctrl.mem_wr),
    .data_out  (mem_data)
  );

  // ---------------- write back ----------------
  mux2 #(.WIDTH(32)) u_wb_mux (
    .d0  (alu_result),
    .d1  (mem_data),
    .sel (ctrl.wb_data),
    .y   (bus_w)
  );

  // ---------------- next PC ----------------
  next_pc_logic u_next_pc (
    .pc       (pc),
    .imm26    (imm26),
    .imm32    (imm32),
    .pc_src   (pc_src),
    .next_pc  (next_pc)
  );
endmodule
