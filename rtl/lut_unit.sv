// Nonlinear lookup operation unit: the hash step of the LUT instruction.
//
// Combinational. The 16-bit input LUTIN (the A operand bus) is split into
// three parts: LUTIN[4:0] goes through S-Box 1, LUTIN[9:5] through S-Box 2,
// and the upper six bits LUTIN[15:10] bypass the S-boxes. The nibble
// operation then reassembles the 16-bit LUTOUT from the ten substituted bits
// and the six bypassed bits. The split into 10 + 6 bits and the two 5-bit
// S-boxes follow the design's block diagram; the design names the nibble
// operation without defining it, so here it is the simplest reassembly,
// LUTOUT = {LUTIN[15:10], SBox2(LUTIN[9:5]), SBox1(LUTIN[4:0])}.
module lut_unit
  import cop_pkg::*;
(
  input  word_t lutin,
  output word_t lutout
);

  logic [4:0] s1_out, s2_out;
  logic [9:0] lut_bits;     // ten substituted bits from the two S-boxes
  logic [5:0] bypass_bits;  // six bits that skip the S-boxes

  sbox1 u_sbox1 (.din(lutin[4:0]), .dout(s1_out));
  sbox2 u_sbox2 (.din(lutin[9:5]), .dout(s2_out));

  assign lut_bits    = {s2_out, s1_out};
  assign bypass_bits = lutin[15:10];

  // nibble operation
  assign lutout = {bypass_bits, lut_bits};

endmodule
