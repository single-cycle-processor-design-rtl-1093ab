// Multifunction 32-bit ALU.
//
// Four units work in parallel and a 4-input multiplexer picks one result
// by the upper two bits of the 4-bit operation code alu_op:
//   00 Shift : shifter, data = B, amount = A[4:0], shift op = alu_op[1:0]
//              (SLL additionally needs the sll input)
//   01 SLT   : the adder subtracts and the result is {31'b0, sign ^ overflow}
//   10 Arith : A + B, or A - B when alu_op[1] = 1 (B inverted, carry-in 1)
//   11 Logic : alu_op[1:0] AND = 00, OR = 01, XOR = 10, NOR = 11
// zero is the NOR of all result bits; overflow is the two's complement
// overflow of the adder (operands of equal sign, sum of the other sign).
// The logic-unit order XOR = 10 / NOR = 11 is chosen here to match the ALU
// control codes. Combinational.
//
// The unit structure, selection codes and SLT rule follow the COE 301
// multifunction ALU; the overflow formula is this design's own.
module alu
  import mips_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       alu_op,
  input  logic             sll,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             overflow
);
  logic [1:0]       sel;
  logic             sub;
  logic [WIDTH-1:0] b_in;
  logic [WIDTH-1:0] sum;
  logic [WIDTH-1:0] logic_res;
  logic [WIDTH-1:0] slt_res;
  logic [31:0]      shift_res;

  // the shifter is a fixed 32-bit unit
  if (WIDTH != 32) begin : g_width_check
    $error("alu: WIDTH must be 32 (the shifter is 32 bits)");
  end

  shifter u_shifter (
    .data     (b[31:0]),
    .sa       (a[4:0]),
    .shift_op (alu_op[1:0]),
    .sll      (sll),
    .data_out (shift_res)
  );

  always_comb begin
    sel  = alu_op[3:2];
    // SLT always subtracts; Arith subtracts when bit 1 is set
    sub  = alu_op[1];
    b_in = b ^ {WIDTH{sub}};
    sum  = a + b_in + WIDTH'(sub);
    overflow = (a[WIDTH-1] == b_in[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
    slt_res  = WIDTH'(sum[WIDTH-1] ^ overflow);

    unique case (alu_op[1:0])
      2'b00: logic_res = a & b;
      2'b01: logic_res = a | b;
      2'b10: logic_res = a ^ b;
      default: logic_res = ~(a | b);
    endcase

    unique case (sel)
      SEL_SHIFT: result = shift_res;
      SEL_SLT:   result = slt_res;
      SEL_ARITH: result = sum;
      default:   result = logic_res;
    endcase

    zero = ~|result;
  end
endmodule
