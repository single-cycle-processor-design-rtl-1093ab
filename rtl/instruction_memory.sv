// Instruction memory: read-only, combinational read.
//
// The byte address addr (the PC) selects a 32-bit instruction; the word
// index is addr[$clog2(WORDS)+1:2] and higher address bits are ignored.
// The datapath never writes instructions, so there is no write port: the
// contents (the array mem) are loaded before the processor runs, from a
// hex file named by INIT_FILE (one 32-bit word per line) or by the
// testbench. WORDS is this design's choice.
//
// Read-only, combinational behaviour follows the COE 301 design; the
// size and the loading mechanism are this design's own.
module instruction_memory #(
  parameter int    WORDS     = 256,
  parameter string INIT_FILE = ""
) (
  input  logic [31:0] addr,
  output logic [31:0] instr
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_comb instr = mem[addr[AW+1:2]];
endmodule
