// Input register: holds the instruction that the combinational logic decodes.
//
// On every rising clock edge the register captures the instruction offered on
// `instr` when `instr_valid` is high, and the NOP instruction word (0x7000)
// otherwise, so an idle cycle never writes a register. A synchronous,
// active-high reset also loads the NOP word. The register is the one the
// design places between the instruction input (CTRL) and the combinational
// logic; the valid input, the idle NOP and the reset value are this design's
// own choices (the reset value matches the instruction shown during reset in
// the design's full-program waveform).
//
// Timing: an instruction offered in cycle n is decoded in cycle n+1 and its
// result is written to the register file at the end of cycle n+1.
module input_register
  import cop_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   instr_valid,
  input  instr_t instr,
  output instr_t instr_q
);

  always_ff @(posedge clk) begin
    if (rst)              instr_q <= NOP_INSTR;
    else if (instr_valid) instr_q <= instr;
    else                  instr_q <= NOP_INSTR;
  end

endmodule
