// N-bit edge-triggered register with write enable.
//
// On a rising clock edge, q takes d when we = 1 and holds otherwise; the
// output only changes at a clock edge. A synchronous reset to RESET_VALUE
// is an addition of this design (the basic element has none) so that the
// program counter built from it starts at a known address.
//
// Follows the COE 301 register element; the reset is this design's own.
module register #(
  parameter int           N           = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end
endmodule
