// Control unit: instruction decoder and control logic.
//
// Purely combinational. The 16-bit instruction is split into its four 4-bit
// fields (opcode, Rd, Ra, Rb, most significant first) and the opcode is
// mapped to the control word:
//   wen       register-file write enable
//   alu_ctrl  3-bit ALU operation (001 ADD ... 111 MOV, 000 none)
//   sh_ctrl   2-bit shifter operation (01 ROR8, 10 ROR4, 11 SLL8)
//   mux_ctrl  2-bit result select (01 ALU, 10 shifter, 11 lookup unit)
// The codes follow the design's control truth table, with one departure:
// the table lists WEN = 1 for NOP, while the instruction list defines NOP
// as "no operation"; here NOP drives WEN = 0 so that it changes no register.
// Opcodes 1100..1111 are undefined and decode like NOP (this design's
// choice).
module control_unit
  import cop_pkg::*;
(
  input  instr_t    instr,
  output reg_addr_t rd,
  output reg_addr_t ra,
  output reg_addr_t rb,
  output ctrl_t     ctrl
);

  assign rd = instr.rd;
  assign ra = instr.ra;
  assign rb = instr.rb;

  always_comb begin
    ctrl = '{wen: 1'b0, alu_ctrl: ALU_NONE, sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
    unique case (instr.opcode)
      OP_ADD:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_ADD,  sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_SUB:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_SUB,  sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_AND:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_AND,  sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_OR:   ctrl = '{wen: 1'b1, alu_ctrl: ALU_OR,   sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_XOR:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_XOR,  sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_NOT:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_NOT,  sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_MOV:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_MOV,  sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_NOP:  ctrl = '{wen: 1'b0, alu_ctrl: ALU_NONE, sh_ctrl: SH_NONE, mux_ctrl: MUX_ALU};
      OP_ROR8: ctrl = '{wen: 1'b1, alu_ctrl: ALU_NONE, sh_ctrl: SH_ROR8, mux_ctrl: MUX_SHF};
      OP_ROR4: ctrl = '{wen: 1'b1, alu_ctrl: ALU_NONE, sh_ctrl: SH_ROR4, mux_ctrl: MUX_SHF};
      OP_SLL8: ctrl = '{wen: 1'b1, alu_ctrl: ALU_NONE, sh_ctrl: SH_SLL8, mux_ctrl: MUX_SHF};
      OP_LUT:  ctrl = '{wen: 1'b1, alu_ctrl: ALU_NONE, sh_ctrl: SH_NONE, mux_ctrl: MUX_LUT};
      default: ;
    endcase
  end

endmodule
