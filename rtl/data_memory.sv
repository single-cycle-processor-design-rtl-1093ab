// Data memory for load and store words.
//
// Word-organised, WORDS x 32 bits, indexed by addr[$clog2(WORDS)+1:2]
// (higher bits ignored; only word accesses exist). Reading is
// combinational: with mem_read = 1 data_out shows the addressed word,
// otherwise data_out is 0 (the output is disabled). Writing is
// synchronous: at a rising clock edge with mem_write = 1 the addressed
// word takes data_in. Contents are not reset. WORDS is this design's
// choice.
//
// The MemRead/MemWrite behaviour follows the COE 301 design; the size and
// the 0 output when not reading are this design's own.
module data_memory #(
  parameter int WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] data_in,
  input  logic        mem_read,
  input  logic        mem_write,
  output logic [31:0] data_out
);
  localparam int AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (mem_write) mem[idx] <= data_in;
  end

  always_comb data_out = mem_read ? mem[idx] : '0;
endmodule
