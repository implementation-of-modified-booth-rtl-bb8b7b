// booth_wallace_de2_top: the multiplier as it is put on an FPGA board.
//
// Two 16-bit two's complement operands come in from slide switches, the
// Booth-Wallace multiplier forms their 32-bit product, and the product is
// shown in hexadecimal on eight seven-segment displays, hex_n[7] holding the
// most significant nibble. There is no clock: the displays follow the
// switches after the combinational delay of the multiplier.
//
// The 16-bit operands, the 32-bit product and the hexadecimal display follow
// the board demonstration of the design. How the 32 operand bits are mapped
// onto physical switches is not fixed here; the two operands are plain
// 16-bit ports so that a pin assignment or a small loader can feed them.
//
// Interface: sw_x, sw_y (16 bits) in; hex_n[8] (7 bits each, active-low
// segments {g,f,e,d,c,b,a}) out.
module booth_wallace_de2_top (
  input  logic [15:0] sw_x,
  input  logic [15:0] sw_y,
  output logic [6:0]  hex_n [8]
);

  logic [31:0] prod;

  booth_wallace_mult #(.N(16)) u_mult (
    .x   (sw_x),
    .y   (sw_y),
    .prod(prod)
  );

  for (genvar d = 0; d < 8; d++) begin : g_digit
    hex7seg u_hex (.nibble(prod[4*d +: 4]), .seg_n(hex_n[d]));
  end

endmodule
