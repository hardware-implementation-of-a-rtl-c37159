// Self-checking testbench of the shifter: ROR8, ROR4, SLL8 and the
// pass-through code on walking-one and random words.
module tb_shifter;
  import cop_pkg::*;
  import cop_ref_pkg::*;

  logic [15:0] b, y;
  sh_ctrl_e    c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  shifter dut (.bbus(b), .ctrl(c), .shiftout(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input sh_ctrl_e cc, input logic [15:0] bb);
    logic [15:0] exp;
    c = cc; b = bb;
    #1;
    case (cc)
      SH_ROR8: exp = ref_ror(bb, 8);
      SH_ROR4: exp = ref_ror(bb, 4);
      SH_SLL8: exp = ref_sll(bb, 8);
      default: exp = bb;
    endcase
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL ctrl=%b b=%h got=%h exp=%h", cc, bb, y, exp);
    end
  endtask

  initial begin
    // hand-worked examples
    c = SH_ROR8; b = 16'h1234; #1; checks++; if (y !== 16'h3412) failures++;
    c = SH_ROR4; b = 16'h1234; #1; checks++; if (y !== 16'h4123) failures++;
    c = SH_SLL8; b = 16'h1234; #1; checks++; if (y !== 16'h3400) failures++;
    for (int i = 0; i < 16; i++) begin
      check(SH_ROR8, 16'(1) << i);
      check(SH_ROR4, 16'(1) << i);
      check(SH_SLL8, 16'(1) << i);
      check(SH_NONE, 16'(1) << i);
    end
    for (int n = 0; n < 2000; n++) check(sh_ctrl_e'($urandom_range(0, 3)), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
