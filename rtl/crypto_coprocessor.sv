// 16-bit cryptographic coprocessor: top level.
//
// The coprocessor executes a 12-instruction set (ADD, SUB, AND, OR, XOR,
// NOT, MOV, NOP, ROR8, ROR4, SLL8 and the nonlinear lookup LUT) on sixteen
// 16-bit registers, one instruction per clock. It is built from three
// parts wired as in the design's top-level block diagram:
//   - the input register, which captures the instruction (CTRL);
//   - the 16x16 register file, read at Ra and Rb onto ABUS and BBUS and
//     written at Rd with the result RES;
//   - the combinational logic (control unit, ALU, shifter, lookup unit and
//     result multiplexer), which turns the instruction and the operands into
//     RES and the write enable.
//
// Interface: `instr` with `instr_valid` offers one instruction per cycle;
// `load_*` lets the host write a register and `rd_addr`/`rd_data` read one
// (the host port is this design's addition). `res` and `res_wen` show the
// result that is written back at the next edge.
//
// Timing: an instruction offered in cycle n is captured at the end of
// cycle n, executes in cycle n+1 and its result is in R[Rd] after the edge
// that ends cycle n+1. Because write-back completes in the same edge that
// captures the next instruction, back-to-back dependent instructions need
// no stall or bypass. Reset (synchronous, active high) clears all registers
// and loads a NOP into the input register.
module crypto_coprocessor
  import cop_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      instr_valid,
  input  instr_t    instr,
  input  logic      load_en,
  input  reg_addr_t load_addr,
  input  word_t     load_data,
  input  reg_addr_t rd_addr,
  output word_t     rd_data,
  output word_t     res,
  output logic      res_wen
);

  instr_t    instr_q;
  reg_addr_t ra, rb, rd;
  word_t     abus, bbus;

  input_register u_ir (
    .clk         (clk),
    .rst         (rst),
    .instr_valid (instr_valid),
    .instr       (instr),
    .instr_q     (instr_q)
  );

  register_file #(.WIDTH(DATA_W), .DEPTH(NREGS)) u_rf (
    .clk        (clk),
    .rst        (rst),
    .ra         (ra),
    .rb         (rb),
    .abus       (abus),
    .bbus       (bbus),
    .wen        (res_wen),
    .rd         (rd),
    .res        (res),
    .load_en    (load_en),
    .load_addr  (load_addr),
    .load_data  (load_data),
    .host_raddr (rd_addr),
    .host_rdata (rd_data)
  );

  comb_logic u_comb (
    .instr (instr_q),
    .abus  (abus),
    .bbus  (bbus),
    .ra    (ra),
    .rb    (rb),
    .rd    (rd),
    .wen   (res_wen),
    .res   (res)
  );

endmodule
