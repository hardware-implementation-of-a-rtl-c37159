// Shifter unit: rotations and a logical shift of the B operand bus.
//
// Combinational. With the 2-bit shifter control code:
//   01 ROR8  rotate BBUS right by WIDTH/2 (8 bits at the default width)
//   10 ROR4  rotate BBUS right by WIDTH/4 (4 bits)
//   11 SLL8  shift BBUS left logically by WIDTH/2 (8 bits), zeros enter
//   00 pass BBUS unchanged (this design's choice; never selected for RES)
// The operations and codes follow the design's shifter and control tables.
// The shift of the left shift is 8 bits, as the shifter table's description
// and the control table's name SLL8 give it. The amounts scale with WIDTH
// as half and quarter of the word.
module shifter
  import cop_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] bbus,
  input  sh_ctrl_e         ctrl,
  output logic [WIDTH-1:0] shiftout
);

  localparam int unsigned HALF    = WIDTH / 2;
  localparam int unsigned QUARTER = WIDTH / 4;

  always_comb begin
    unique case (ctrl)
      SH_ROR8: shiftout = {bbus[HALF-1:0], bbus[WIDTH-1:HALF]};
      SH_ROR4: shiftout = {bbus[QUARTER-1:0], bbus[WIDTH-1:QUARTER]};
      SH_SLL8: shiftout = {bbus[WIDTH-HALF-1:0], {HALF{1'b0}}};
      default: shiftout = bbus;
    endcase
  end

endmodule
