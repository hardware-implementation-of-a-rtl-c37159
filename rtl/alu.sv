// Arithmetic logic unit of the coprocessor.
//
// Combinational. With the 3-bit control code from the control unit it
// computes ALUOUT from the two operand buses:
//   001 ADD  ABUS + BBUS (modulo 2^WIDTH, carry dropped)
//   010 SUB  ABUS - BBUS (modulo 2^WIDTH, borrow dropped)
//   011 AND, 100 OR, 101 XOR  bitwise
//   110 NOT  ~ABUS
//   111 MOV  ABUS
//   000 no operation: ALUOUT = 0 (this design's choice; the control unit
//       never writes it back)
// The operation list and the 3-bit control code follow the design's ALU and
// control tables; the design gives no carry, overflow or status flags, and
// none are produced.
module alu
  import cop_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] abus,
  input  logic [WIDTH-1:0] bbus,
  input  alu_ctrl_e        ctrl,
  output logic [WIDTH-1:0] aluout
);

  always_comb begin
    unique case (ctrl)
      ALU_ADD:  aluout = abus + bbus;
      ALU_SUB:  aluout = abus - bbus;
      ALU_AND:  aluout = abus & bbus;
      ALU_OR:   aluout = abus | bbus;
      ALU_XOR:  aluout = abus ^ bbus;
      ALU_NOT:  aluout = ~abus;
      ALU_MOV:  aluout = abus;
      default:  aluout = '0;
    endcase
  end

endmodule
