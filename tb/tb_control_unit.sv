// Self-checking testbench of the control unit: every opcode against the
// control truth table (written out here as a literal table), and the
// register fields of random instruction words.
module tb_control_unit;
  import cop_pkg::*;

  instr_t    instr;
  reg_addr_t rd, ra, rb;
  ctrl_t     ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  control_unit dut (.instr(instr), .rd(rd), .ra(ra), .rb(rb), .ctrl(ctrl));

  // {WEN, ALUctrl, ShifterCtrl, MuxCtrl} per opcode 0..15. NOP and the
  // unused opcodes 1100..1111 do not write.
  localparam logic [7:0] TRUTH [16] = '{
    8'b1_001_00_01,  // ADD
    8'b1_010_00_01,  // SUB
    8'b1_011_00_01,  // AND
    8'b1_100_00_01,  // OR
    8'b1_101_00_01,  // XOR
    8'b1_110_00_01,  // NOT
    8'b1_111_00_01,  // MOV
    8'b0_000_00_01,  // NOP
    8'b1_000_01_10,  // ROR8
    8'b1_000_10_10,  // ROR4
    8'b1_000_11_10,  // SLL8
    8'b1_000_00_11,  // LUT
    8'b0_000_00_01,
    8'b0_000_00_01,
    8'b0_000_00_01,
    8'b0_000_00_01};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++) begin
      for (int n = 0; n < 40; n++) begin
        logic [15:0] w;
        w = {4'(op), 12'($urandom)};
        instr = instr_t'(w);
        #1;
        checks++;
        if (ctrl !== TRUTH[op]) begin
          failures++;
          $display("FAIL opcode %b: ctrl=%b expected %b", op[3:0], ctrl, TRUTH[op]);
        end
        checks++;
        if (rd !== w[11:8] || ra !== w[7:4] || rb !== w[3:0]) begin
          failures++;
          $display("FAIL fields of %h: rd=%h ra=%h rb=%h", w, rd, ra, rb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
