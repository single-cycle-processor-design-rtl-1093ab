// Tri-state buffer.
//
// data_out follows data_in while enable = 1 and is released (high
// impedance) while enable = 0, so that several buffers can share one bus
// as long as at most one is enabled at a time. Two buffers with
// complementary enables form a 2-input multiplexer; a row of them with
// one-hot enables forms a bus multiplexer. Combinational.
//
// Follows the COE 301 tri-state buffer.
module tristate_buffer #(
  parameter int WIDTH = 1
) (
  input  logic [WIDTH-1:0] data_in,
  input  logic             enable,
  output tri   [WIDTH-1:0] data_out
);
  assign data_out = enable ? data_in : 'z;
endmodule
