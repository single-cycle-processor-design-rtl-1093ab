// Shared definitions for the single-cycle MIPS-subset processor.
//
// Holds the opcode and funct encodings of the supported instructions
// (add, sub, and, or, xor, slt, addi, slti, andi, ori, xori, lw, sw, beq,
// bne, j), the 4-bit ALU operation codes, the shifter operation codes and
// the two control bundles passed between the controllers and the datapath.
//
// The ALU code is {selection[1:0], operation[1:0]}: selection Shift = 00,
// SLT = 01, Arith = 10, Logic = 11. For Arith, bit 1 means subtract. For
// Logic the operation is AND = 00, OR = 01, XOR = 10, NOR = 11; this order
// makes the low two bits equal to the low two bits of the MIPS funct and
// opcode of each logic instruction (an assignment of this design, see the
// README for the alternative ordering).
//
// Encodings and ALU codes follow the COE 301 single-cycle design; the
// logic-unit order is this design's choice, as noted above.
package mips_pkg;

  // ---------------- opcode field, Instruction[31:26] ----------------
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_SLTI  = 6'h0a,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_XORI  = 6'h0e,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // ---------------- funct field of R-type, Instruction[5:0] ----------------
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_XOR = 6'h26;
  localparam logic [5:0] FN_SLT = 6'h2a;

  // ---------------- ALU selection (upper two bits of the ALU code) ----------------
  localparam logic [1:0] SEL_SHIFT = 2'b00;
  localparam logic [1:0] SEL_SLT   = 2'b01;
  localparam logic [1:0] SEL_ARITH = 2'b10;
  localparam logic [1:0] SEL_LOGIC = 2'b11;

  // ---------------- 4-bit ALU operation codes ----------------
  localparam logic [3:0] ALU_ADD = 4'b1000;
  localparam logic [3:0] ALU_SUB = 4'b1010;
  localparam logic [3:0] ALU_SLT = 4'b0110;
  localparam logic [3:0] ALU_AND = 4'b1100;
  localparam logic [3:0] ALU_OR  = 4'b1101;
  localparam logic [3:0] ALU_XOR = 4'b1110;
  localparam logic [3:0] ALU_NOR = 4'b1111;

  // ---------------- shifter operation (low two bits when selection = Shift) ----------------
  // SLL and SRL share 00; the separate sll line tells them apart.
  localparam logic [1:0] SH_LOGICAL = 2'b00;
  localparam logic [1:0] SH_SRA     = 2'b01;
  localparam logic [1:0] SH_ROR     = 2'b11;

  // ---------------- PCSrc ----------------
  localparam logic [1:0] PCSRC_INC    = 2'd0;
  localparam logic [1:0] PCSRC_JUMP   = 2'd1;
  localparam logic [1:0] PCSRC_BRANCH = 2'd2;

  // Main control signals (see main_control).
  typedef struct packed {
    logic reg_dst;   // 1: destination is Rd, 0: Rt
    logic reg_wr;    // write the register file
    logic ext_op;    // 1: sign-extend Imm16, 0: zero-extend
    logic alu_src;   // 1: second ALU operand is the extended immediate
    logic mem_rd;    // read data memory
    logic mem_wr;    // write data memory
    logic wb_data;   // 1: BusW = memory Data_out, 0: ALU result
  } main_ctrl_t;

  // One-hot opcode decoder lines.
  typedef struct packed {
    logic rtype;
    logic addi;
    logic slti;
    logic andi;
    logic ori;
    logic xori;
    logic lw;
    logic sw;
    logic beq;
    logic bne;
    logic j;
  } op_dec_t;

endpackage
