// PC control unit.
//
// Branch = BEQ & Zero | BNE & ~Zero  (branch taken)
// Jump   = J
// PCSrc  = 2 (branch target) if Branch, else 1 (jump target) if Jump,
//          else 0 (incremented PC).
// Branch and Jump are never both 1 (they come from one opcode).
// Combinational.
//
// Follows the COE 301 PC control table.
module pc_control
  import mips_pkg::*;
(
  input  logic       beq,
  input  logic       bne,
  input  logic       j,
  input  logic       zero,
  output logic [1:0] pc_src
);
  logic branch;

  always_comb begin
    branch = (beq & zero) | (bne & ~zero);
    if (branch) pc_src = PCSRC_BRANCH;
    else if (j) pc_src = PCSRC_JUMP;
    else        pc_src = PCSRC_INC;
  end
endmodule
