// Shared types and constants of the 16-bit cryptographic coprocessor.
//
// The coprocessor has sixteen 16-bit registers and executes 16-bit
// instructions of four 4-bit fields: opcode [15:12], Rd [11:8], Ra [7:4]
// and Rb [3:0]. The twelve opcodes, the 3-bit ALU control code, the 2-bit
// shifter control code and the 2-bit result-multiplexer code below are the
// encodings of the design's instruction and control tables. The code for
// opcodes 1100..1111 (unused) and the NOP instruction word used at reset
// are this design's own choices.
package cop_pkg;

  localparam int unsigned DATA_W = 16;  // register and bus width
  localparam int unsigned NREGS  = 16;  // register file depth
  localparam int unsigned ADDR_W = 4;   // register address width

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] reg_addr_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,
    OP_SUB  = 4'b0001,
    OP_AND  = 4'b0010,
    OP_OR   = 4'b0011,
    OP_XOR  = 4'b0100,
    OP_NOT  = 4'b0101,
    OP_MOV  = 4'b0110,
    OP_NOP  = 4'b0111,
    OP_ROR8 = 4'b1000,
    OP_ROR4 = 4'b1001,
    OP_SLL8 = 4'b1010,
    OP_LUT  = 4'b1011
  } opcode_e;

  // ALU control (3 bits)
  typedef enum logic [2:0] {
    ALU_NONE = 3'b000,
    ALU_ADD  = 3'b001,
    ALU_SUB  = 3'b010,
    ALU_AND  = 3'b011,
    ALU_OR   = 3'b100,
    ALU_XOR  = 3'b101,
    ALU_NOT  = 3'b110,
    ALU_MOV  = 3'b111
  } alu_ctrl_e;

  // Shifter control (2 bits)
  typedef enum logic [1:0] {
    SH_NONE = 2'b00,
    SH_ROR8 = 2'b01,
    SH_ROR4 = 2'b10,
    SH_SLL8 = 2'b11
  } sh_ctrl_e;

  // Result multiplexer select (2 bits)
  typedef enum logic [1:0] {
    MUX_ZERO = 2'b00,
    MUX_ALU  = 2'b01,
    MUX_SHF  = 2'b10,
    MUX_LUT  = 2'b11
  } mux_ctrl_e;

  // Instruction word, most significant field first
  typedef struct packed {
    logic [3:0] opcode;
    reg_addr_t  rd;
    reg_addr_t  ra;
    reg_addr_t  rb;
  } instr_t;

  // Control word driven by the control unit
  typedef struct packed {
    logic      wen;
    alu_ctrl_e alu_ctrl;
    sh_ctrl_e  sh_ctrl;
    mux_ctrl_e mux_ctrl;
  } ctrl_t;

  // Instruction held in the input register while idle or in reset
  localparam instr_t NOP_INSTR = '{opcode: OP_NOP, rd: '0, ra: '0, rb: '0};

endpackage
