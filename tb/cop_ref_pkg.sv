// Reference model of the coprocessor for the testbenches.
//
// Each function computes what one unit of the coprocessor must produce,
// written independently of the RTL: shifts and rotations bit by bit,
// arithmetic in 32-bit integers reduced to 16 bits, and the two S-box
// tables as plain constant arrays. `ref_exec` gives the value an
// instruction writes to Rd and whether it writes at all.
package cop_ref_pkg;

  // S-Box 1, inputs 0..31
  localparam logic [4:0] SBOX1_TAB [32] = '{
    5'h01, 5'h0a, 5'h0b, 5'h07, 5'h00, 5'h03, 5'h06, 5'h0e,
    5'h0f, 5'h05, 5'h0c, 5'h0d, 5'h08, 5'h02, 5'h09, 5'h04,
    5'h15, 5'h12, 5'h14, 5'h1f, 5'h17, 5'h1e, 5'h1a, 5'h1c,
    5'h16, 5'h11, 5'h1d, 5'h13, 5'h18, 5'h10, 5'h19, 5'h1b};

  // S-Box 2, inputs 0..31
  localparam logic [4:0] SBOX2_TAB [32] = '{
    5'h00, 5'h06, 5'h04, 5'h01, 5'h0c, 5'h1c, 5'h07, 5'h0b,
    5'h17, 5'h0f, 5'h10, 5'h18, 5'h11, 5'h14, 5'h09, 5'h03,
    5'h0e, 5'h0a, 5'h05, 5'h12, 5'h16, 5'h1e, 5'h1a, 5'h0d,
    5'h19, 5'h1b, 5'h02, 5'h13, 5'h1d, 5'h15, 5'h08, 5'h1f};

  // rotate right by n, one bit at a time
  function automatic logic [15:0] ref_ror(input logic [15:0] v, input int n);
    logic [15:0] r;
    r = v;
    for (int k = 0; k < n; k++) r = {r[0], r[15:1]};
    return r;
  endfunction

  // shift left logical by n, bit by bit
  function automatic logic [15:0] ref_sll(input logic [15:0] v, input int n);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[i] = (i >= n) ? v[i-n] : 1'b0;
    return r;
  endfunction

  function automatic logic [15:0] ref_lut(input logic [15:0] v);
    logic [15:0] r;
    r[15:10] = v[15:10];
    r[9:5]   = SBOX2_TAB[v[9:5]];
    r[4:0]   = SBOX1_TAB[v[4:0]];
    return r;
  endfunction

  // ALU by 3-bit control code
  function automatic logic [15:0] ref_alu(input logic [2:0] c, input logic [15:0] a,
                                          input logic [15:0] b);
    int unsigned ai, bi;
    ai = 32'(a); bi = 32'(b);
    case (c)
      3'b001: return 16'((ai + bi) % 65536);
      3'b010: return 16'((ai + 65536 - bi) % 65536);
      3'b011: return a & b;
      3'b100: return a | b;
      3'b101: return a ^ b;
      3'b110: return 16'(65535 - ai);
      3'b111: return a;
      default: return 16'h0000;
    endcase
  endfunction

  // Value an instruction writes to Rd (wen = 0: no write)
  function automatic void ref_exec(input logic [3:0] op, input logic [15:0] a,
                                   input logic [15:0] b, output logic wen,
                                   output logic [15:0] res);
    wen = 1'b1;
    res = 16'h0000;
    case (op)
      4'h0: res = ref_alu(3'b001, a, b);
      4'h1: res = ref_alu(3'b010, a, b);
      4'h2: res = ref_alu(3'b011, a, b);
      4'h3: res = ref_alu(3'b100, a, b);
      4'h4: res = ref_alu(3'b101, a, b);
      4'h5: res = ref_alu(3'b110, a, b);
      4'h6: res = ref_alu(3'b111, a, b);
      4'h8: res = ref_ror(b, 8);
      4'h9: res = ref_ror(b, 4);
      4'hA: res = ref_sll(b, 8);
      4'hB: res = ref_lut(a);
      default: wen = 1'b0;  // NOP and unused opcodes
    endcase
  endfunction

endpackage
