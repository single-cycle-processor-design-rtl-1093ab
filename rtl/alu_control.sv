// ALU control unit.
//
// Produces the 4-bit ALU code from the decoded opcode and, for R-type
// instructions, the funct field:
//   R-type: and 1100, or 1101, xor 1110, add 1000, sub 1010, slt 0110
//   addi, lw, sw -> 1000 (ADD)   slti -> 0110 (SLT)   beq, bne -> 1010 (SUB)
//   andi 1100, ori 1101, xori 1110
// The low two bits of each logic/arith code equal the low two bits of the
// instruction's funct (R-type) or opcode (I-type). An R-type funct outside
// the subset and the jump (don't care) give ADD; this is a choice of this
// design. Combinational.
//
// The codes follow the COE 301 ALU control table.
module alu_control
  import mips_pkg::*;
(
  input  op_dec_t    dec,
  input  logic [5:0] funct,
  output logic [3:0] alu_op
);
  always_comb begin
    alu_op = ALU_ADD;
    if (dec.rtype) begin
      unique case (funct)
        FN_ADD:  alu_op = ALU_ADD;
        FN_SUB:  alu_op = ALU_SUB;
        FN_AND:  alu_op = ALU_AND;
        FN_OR:   alu_op = ALU_OR;
        FN_XOR:  alu_op = ALU_XOR;
        FN_SLT:  alu_op = ALU_SLT;
        default: alu_op = ALU_ADD;
      endcase
    end
    else if (dec.slti)              alu_op = ALU_SLT;
    else if (dec.andi)              alu_op = ALU_AND;
    else if (dec.ori)               alu_op = ALU_OR;
    else if (dec.xori)              alu_op = ALU_XOR;
    else if (dec.beq || dec.bne)    alu_op = ALU_SUB;
    // addi, lw, sw, j: ADD
  end
endmodule
