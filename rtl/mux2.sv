// Two-input multiplexer, WIDTH bits wide: y = sel ? d1 : d0.
//
// Used for the RegDst (Rt/Rd), ALUSrc (BusB/immediate) and WBdata
// (ALU result/memory data) selections of the datapath. Combinational.
//
// The multiplexer is named but not detailed in the COE 301 design; this
// behavioural form is this design's own.
module mux2 #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
