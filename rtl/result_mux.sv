// Result multiplexer: selects the unit whose output becomes RES.
//
// Combinational. With the 2-bit MuxCtrl code from the control unit:
//   01 ALU output, 10 shifter output, 11 nonlinear lookup output,
//   00 zero (never selected by a defined opcode; this design's choice).
// The codes follow the design's control truth table.
module result_mux
  import cop_pkg::*;
(
  input  mux_ctrl_e sel,
  input  word_t     alu_out,
  input  word_t     shf_out,
  input  word_t     lut_out,
  output word_t     res
);

  always_comb begin
    unique case (sel)
      MUX_ALU: res = alu_out;
      MUX_SHF: res = shf_out;
      MUX_LUT: res = lut_out;
      default: res = '0;
    endcase
  end

endmodule
