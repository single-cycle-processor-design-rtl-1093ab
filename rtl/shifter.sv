// 32-bit shifter / rotator for SLL, SRL, SRA and ROR.
//
// Every operation is turned into a right shift of a 63-bit word:
//   SRL: 0^31 || data        SRA: data[31]^31 || data
//   ROR: data[30:0] || data  SLL: data || 0^31
// Five multiplexer stages then shift right by 0/16, 0/8, 0/4, 0/2 and 0/1
// bits, each stage dropping the bits the next one can no longer reach
// (63 -> 47 -> 39 -> 35 -> 33 -> 32 bits); the output is the low 32 bits.
// A left shift by n equals a right shift of the SLL extension by 31 - n,
// so for SLL the shift amount is replaced by its 1's complement (sa XOR
// sll). Rotate-left is left to software (ROL n = ROR 32 - n).
//
// shift_op: SLL/SRL = 00, SRA = 01, ROR = 11. SLL and SRL share a code and
// are told apart by the sll input, which in this design drives both the
// amount complement and the extender. Code 10 behaves like 00.
// Combinational.
//
// The 63-bit extension and the five right-shift stages follow the COE 301
// shifter; the use of the sll line in the extender is this design's own.
module shifter
  import mips_pkg::*;
(
  input  logic [31:0] data,
  input  logic [4:0]  sa,
  input  logic [1:0]  shift_op,
  input  logic        sll,
  output logic [31:0] data_out
);
  logic [62:0] ext;
  logic [4:0]  s;
  logic [46:0] st4;
  logic [38:0] st3;
  logic [34:0] st2;
  logic [32:0] st1;

  always_comb begin
    // extender
    if (sll)                   ext = {data, 31'b0};
    else if (shift_op == SH_SRA) ext = {{31{data[31]}}, data};
    else if (shift_op == SH_ROR) ext = {data[30:0], data};
    else                       ext = {31'b0, data};

    s = sa ^ {5{sll}};

    // shift right 0 or 16, 8, 4, 2, 1
    st4      = s[4] ? ext[62:16] : ext[46:0];
    st3      = s[3] ? st4[46:8]  : st4[38:0];
    st2      = s[2] ? st3[38:4]  : st3[34:0];
    st1      = s[1] ? st2[34:2]  : st2[32:0];
    data_out = s[0] ? st1[32:1]  : st1[31:0];
  end
endmodule
