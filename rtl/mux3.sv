// Three-input multiplexer, WIDTH bits wide, for the PCSrc selection.
//
// sel = 0 picks d0, 1 picks d1, 2 picks d2. The unused code 3 picks d0,
// a choice of this design. Combinational.
//
// Input numbering follows the COE 301 PCSrc multiplexer.
module mux3 #(
  parameter int WIDTH = 30
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (sel)
      2'd1:    y = d1;
      2'd2:    y = d2;
      default: y = d0;
    endcase
  end
endmodule
