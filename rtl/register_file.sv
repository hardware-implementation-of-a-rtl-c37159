// 16 x 16 register file with two read ports, one result write port and a
// host access port.
//
// Registers R0..R15 hold 16-bit words. Read ports A and B are asynchronous:
// ABUS = R[ra] and BBUS = R[rb] follow the addresses combinationally, as the
// operand buses of the combinational logic need. The result RES is written
// to R[rd] on the rising clock edge when `wen` is high. Synchronous,
// active-high reset clears every register to zero.
//
// The host port is this design's own addition, since the coprocessor needs
// some way to receive operands and return results: `load_en` writes
// `load_data` into R[load_addr] on the clock edge, and `host_rdata` shows
// R[host_raddr] combinationally. If the result port and the host port write
// the same register in one cycle, the instruction result wins.
module register_file
  import cop_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned DEPTH = NREGS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // operand read ports
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] abus,
  output logic [WIDTH-1:0] bbus,
  // result write port
  input  logic             wen,
  input  logic [AW-1:0]    rd,
  input  logic [WIDTH-1:0] res,
  // host port
  input  logic             load_en,
  input  logic [AW-1:0]    load_addr,
  input  logic [WIDTH-1:0] load_data,
  input  logic [AW-1:0]    host_raddr,
  output logic [WIDTH-1:0] host_rdata
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else begin
      if (load_en) regs[load_addr] <= load_data;
      if (wen)     regs[rd]        <= res;
    end
  end

  assign abus       = regs[ra];
  assign bbus       = regs[rb];
  assign host_rdata = regs[host_raddr];

endmodule
