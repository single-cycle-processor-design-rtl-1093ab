// Immediate extender.
//
// Widens the 16-bit immediate of an I-type instruction to 32 bits. With
// ext_op = 1 the upper half copies the immediate's sign bit (sign
// extension, used by addi, slti, lw, sw, beq, bne); with ext_op = 0 it is
// zero (andi, ori, xori). As in the classic construction this is only
// wiring plus one AND gate: upper 16 bits = ext_op & imm16[15].
// Purely combinational.
//
// The construction follows the COE 301 single-cycle design exactly.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);
  logic upper;

  always_comb begin
    upper = ext_op & imm16[15];
    imm32 = {{16{upper}}, imm16};
  end
endmodule
