// Program counter.
//
// Instructions are word aligned, so only PC[31:2] is stored, in a 30-bit
// register that is written on every rising clock edge with the next word
// address; PC[1:0] is wired to 00. A synchronous reset sets the PC to 0
// (the reset address is this design's choice).
//
// The 30-bit PC with fixed 00 low bits follows the COE 301 design; the
// reset is this design's own.
module pc_register (
  input  logic        clk,
  input  logic        rst,
  input  logic [29:0] next_pc,
  output logic [31:0] pc
);
  logic [29:0] pc_word;

  register #(.N(30), .RESET_VALUE('0)) u_pc (
    .clk (clk),
    .rst (rst),
    .we  (1'b1),
    .d   (next_pc),
    .q   (pc_word)
  );

  assign pc = {pc_word, 2'b00};
endmodule
