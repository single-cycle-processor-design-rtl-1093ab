// MIPS register file: 31 general-purpose 32-bit registers, R0 reads 0.
//
// Two read ports and one write port.
//
// Write: a decoder on rw, ANDed with reg_write, enables exactly one
// register, which takes bus_w at the rising clock edge. R0 has no storage,
// so writes to it are dropped (decoder output 0 is left unused). The
// clock is used only for writing.
//
// Read: each read bus is shared by one tri-state buffer per register; a
// decoder on ra (rb) enables exactly one of them, and for address 0 a
// buffer driving constant 0. Reads are therefore combinational: bus_a
// shows Reg(ra) and bus_b shows Reg(rb) an access time after the
// addresses change. A register read in the cycle it is written shows the
// old value until the edge.
//
// Lint tools report bus_a_t and bus_b_t as nets with several drivers:
// that is the tri-state bus itself, and the one-hot decoders make sure
// only one buffer drives it at a time. Registers are not reset.
//
// Decoders, write gating and tri-state read buses follow the COE 301
// register file.
module register_file #(
  parameter int NREGS = 32,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic                     reg_write,
  input  logic [WIDTH-1:0]         bus_w,
  output logic [WIDTH-1:0]         bus_a,
  output logic [WIDTH-1:0]         bus_b
);
  // regs[0] does not exist: R0 is the constant 0 driver
  logic [WIDTH-1:0] regs [1:NREGS-1];
  logic [NREGS-1:0] we_dec, ra_dec, rb_dec;
  tri   [WIDTH-1:0] bus_a_t, bus_b_t;

  always_comb begin
    we_dec = '0;
    ra_dec = '0;
    rb_dec = '0;
    we_dec[rw] = reg_write;
    ra_dec[ra] = 1'b1;
    rb_dec[rb] = 1'b1;
  end

  for (genvar r = 1; r < NREGS; r++) begin : g_reg
    always_ff @(posedge clk) begin
      if (we_dec[r]) regs[r] <= bus_w;
    end

    tristate_buffer #(.WIDTH(WIDTH)) u_buf_a (.data_in(regs[r]), .enable(ra_dec[r]), .data_out(bus_a_t));
    tristate_buffer #(.WIDTH(WIDTH)) u_buf_b (.data_in(regs[r]), .enable(rb_dec[r]), .data_out(bus_b_t));
  end

  // the "0" drivers for R0
  tristate_buffer #(.WIDTH(WIDTH)) u_zero_a (.data_in('0), .enable(ra_dec[0]), .data_out(bus_a_t));
  tristate_buffer #(.WIDTH(WIDTH)) u_zero_b (.data_in('0), .enable(rb_dec[0]), .data_out(bus_b_t));

  assign bus_a = bus_a_t;
  assign bus_b = bus_b_t;

  // the read decoders are one-hot, so each bus has exactly one driver
  always_comb begin
    assert ($onehot(ra_dec) && $onehot(rb_dec)) else $error("register_file: read decoder not one-hot");
  end
endmodule
