// Next-PC logic.
//
// Works on word addresses (PC[31:2], 30 bits):
//   Next PC Address = PC[31:2] + 1                      (PC + 4)
//   Jump Target     = PC[31:28] || imm26                ({PC[31:28], imm26, 00})
//   Branch Target   = Next PC Address + imm32[29:0]     (PC + 4 + 4*offset)
// and selects one with pc_src through the PCSrc multiplexer
// (0 = next, 1 = jump, 2 = branch). imm32 is the sign-extended branch
// offset from the immediate extender. The jump target takes its upper four
// bits from the current PC. Combinational.
//
// The three targets and their mux follow the COE 301 datapath.
module next_pc_logic (
  input  logic [31:0] pc,
  input  logic [25:0] imm26,
  input  logic [31:0] imm32,
  input  logic [1:0]  pc_src,
  output logic [29:0] next_pc
);
  logic [29:0] pc_plus1;
  logic [29:0] jump_target;
  logic [29:0] branch_target;

  always_comb begin
    pc_plus1      = pc[31:2] + 30'd1;
    jump_target   = {pc[31:28], imm26};
    branch_target = pc_plus1 + imm32[29:0];
  end

  mux3 #(.WIDTH(30)) u_pc_mux (
    .d0  (pc_plus1),
    .d1  (jump_target),
    .d2  (branch_target),
    .sel (pc_src),
    .y   (next_pc)
  );
endmodule
