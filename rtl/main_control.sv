// Main control unit.
//
// A decoder turns the 6-bit opcode into one line per instruction class
// (R-type, ADDI, SLTI, ANDI, ORI, XORI, LW, SW, BEQ, BNE, J); the datapath
// controls are then sums of those lines:
//   RegDst = R-type            RegWr  = not(SW + BEQ + BNE + J)
//   ExtOp  = not(ANDI+ORI+XORI) ALUSrc = not(R-type + BEQ + BNE)
//   MemRd  = LW   MemWr = SW   WBdata = LW
// Don't-care table entries take whatever these equations give. An opcode
// outside the subset raises no decoder line; this design then suppresses
// register and memory writes for it (RegWr is gated by "any valid opcode").
// The decoder lines are also output for the ALU and PC controllers.
// Combinational.
//
// The decoder, truth table and equations follow the COE 301 main control;
// the handling of unknown opcodes is this design's own.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  output main_ctrl_t ctrl,
  output op_dec_t    dec
);
  logic valid;

  always_comb begin
    dec       = '0;
    dec.rtype = (op == OP_RTYPE);
    dec.addi  = (op == OP_ADDI);
    dec.slti  = (op == OP_SLTI);
    dec.andi  = (op == OP_ANDI);
    dec.ori   = (op == OP_ORI);
    dec.xori  = (op == OP_XORI);
    dec.lw    = (op == OP_LW);
    dec.sw    = (op == OP_SW);
    dec.beq   = (op == OP_BEQ);
    dec.bne   = (op == OP_BNE);
    dec.j     = (op == OP_J);

    valid = |dec;

    ctrl.reg_dst = dec.rtype;
    ctrl.reg_wr  = valid & ~(dec.sw | dec.beq | dec.bne | dec.j);
    ctrl.ext_op  = ~(dec.andi | dec.ori | dec.xori);
    ctrl.alu_src = ~(dec.rtype | dec.beq | dec.bne);
    ctrl.mem_rd  = dec.lw;
    ctrl.mem_wr  = dec.sw;
    ctrl.wb_data = dec.lw;
  end

  // at most one decoder line is active
  always_comb assert ($onehot0(dec)) else $error("main_control: decoder lines not one-hot");
endmodule
