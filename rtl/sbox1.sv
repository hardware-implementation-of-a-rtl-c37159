// S-Box 1 of the nonlinear lookup unit: a 5-bit to 5-bit substitution.
//
// Combinational. `din` is LUTIN[4:0] (the low five bits of ABUS) and `dout`
// becomes LUTOUT[4:0]. The design names the S-box and its 5-bit size but
// states that its values were set at random and does not list them. The
// table is a permutation of 0..31 chosen for this design: the seven entries
// that the design's LUT waveform shows (0x5->0x3, 0x6->0x6, 0x7->0xe,
// 0xa->0xc, 0xb->0xd, 0xc->0x8, 0xf->0x4) are kept, inputs below 16 map to
// outputs below 16 and inputs 16..31 to outputs 16..31, so small operands
// give the results of that waveform. Replace the table to change the hash.
module sbox1 (
  input  logic [4:0] din,
  output logic [4:0] dout
);

  always_comb begin
    unique case (din)
      5'd0 : dout = 5'h01;  5'd1 : dout = 5'h0a;  5'd2 : dout = 5'h0b;  5'd3 : dout = 5'h07;
      5'd4 : dout = 5'h00;  5'd5 : dout = 5'h03;  5'd6 : dout = 5'h06;  5'd7 : dout = 5'h0e;
      5'd8 : dout = 5'h0f;  5'd9 : dout = 5'h05;  5'd10: dout = 5'h0c;  5'd11: dout = 5'h0d;
      5'd12: dout = 5'h08;  5'd13: dout = 5'h02;  5'd14: dout = 5'h09;  5'd15: dout = 5'h04;
      5'd16: dout = 5'h15;  5'd17: dout = 5'h12;  5'd18: dout = 5'h14;  5'd19: dout = 5'h1f;
      5'd20: dout = 5'h17;  5'd21: dout = 5'h1e;  5'd22: dout = 5'h1a;  5'd23: dout = 5'h1c;
      5'd24: dout = 5'h16;  5'd25: dout = 5'h11;  5'd26: dout = 5'h1d;  5'd27: dout = 5'h13;
      5'd28: dout = 5'h18;  5'd29: dout = 5'h10;  5'd30: dout = 5'h19;  5'd31: dout = 5'h1b;
    endcase
  end

endmodule
