// Combinational logic unit: the execute stage of the coprocessor.
//
// From the instruction held in the input register and the two operands read
// from the register file (ABUS = R[Ra], BBUS = R[Rb]) it computes the result
// RES and the write-back controls, all within one clock cycle:
//   - the control unit decodes the instruction into register addresses and
//     the control word (WEN, ALUctrl, ShifterCtrl, MuxCtrl);
//   - the ALU works on ABUS and BBUS, the shifter on BBUS, and the
//     nonlinear lookup unit on ABUS, in parallel;
//   - the result multiplexer picks one of the three outputs as RES.
// The structure follows the design's block diagram of the combinational
// logic unit; placing the instruction decoder here, next to the control
// logic, is this design's choice.
module comb_logic
  import cop_pkg::*;
(
  input  instr_t    instr,
  input  word_t     abus,
  input  word_t     bbus,
  output reg_addr_t ra,
  output reg_addr_t rb,
  output reg_addr_t rd,
  output logic      wen,
  output word_t     res
);

  ctrl_t ctrl;
  word_t alu_out, shf_out, lut_out;

  control_unit u_ctrl (
    .instr (instr),
    .rd    (rd),
    .ra    (ra),
    .rb    (rb),
    .ctrl  (ctrl)
  );

  alu #(.WIDTH(DATA_W)) u_alu (
    .abus   (abus),
    .bbus   (bbus),
    .ctrl   (ctrl.alu_ctrl),
    .aluout (alu_out)
  );

  shifter #(.WIDTH(DATA_W)) u_shifter (
    .bbus     (bbus),
    .ctrl     (ctrl.sh_ctrl),
    .shiftout (shf_out)
  );

  lut_unit u_lut (
    .lutin  (abus),
    .lutout (lut_out)
  );

  result_mux u_mux (
    .sel     (ctrl.mux_ctrl),
    .alu_out (alu_out),
    .shf_out (shf_out),
    .lut_out (lut_out),
    .res     (res)
  );

  assign wen = ctrl.wen;

endmodule
