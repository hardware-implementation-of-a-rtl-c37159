// Self-checking testbench of the ALU: every control code with corner
// operands and random operands, compared against the reference model.
module tb_alu;
  import cop_pkg::*;
  import cop_ref_pkg::*;

  logic [15:0] a, b, y;
  alu_ctrl_e   c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.abus(a), .bbus(b), .ctrl(c), .aluout(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] cc, input logic [15:0] aa, input logic [15:0] bb);
    logic [15:0] exp;
    c = alu_ctrl_e'(cc); a = aa; b = bb;
    #1;
    exp = ref_alu(cc, aa, bb);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL ctrl=%b a=%h b=%h got=%h exp=%h", cc, aa, bb, y, exp);
    end
  endtask

  initial begin
    automatic logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h00ff};
    // fixed examples worked by hand
    c = ALU_ADD; a = 16'h000c; b = 16'h0002; #1; checks++; if (y !== 16'h000e) failures++;
    c = ALU_SUB; a = 16'h0002; b = 16'h0003; #1; checks++; if (y !== 16'hffff) failures++;
    c = ALU_NOT; a = 16'h0006; #1; checks++; if (y !== 16'hfff9) failures++;
    c = ALU_ADD; a = 16'hffff; b = 16'h0001; #1; checks++; if (y !== 16'h0000) failures++;
    for (int cc = 0; cc < 8; cc++)
      foreach (corners[i]) foreach (corners[j]) check(3'(cc), corners[i], corners[j]);
    for (int n = 0; n < 4000; n++) check(3'($urandom_range(0, 7)), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
