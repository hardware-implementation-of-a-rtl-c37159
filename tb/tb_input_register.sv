// Self-checking testbench of the input register: reset value, capture of
// valid instructions on the clock edge, NOP on idle cycles.
module tb_input_register;
  import cop_pkg::*;

  logic   clk = 0, rst, valid;
  instr_t d, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  input_register dut (.clk(clk), .rst(rst), .instr_valid(valid), .instr(d), .instr_q(q));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [15:0] e);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL q=%h expected %h at %0t", q, e, $time);
    end
  endtask

  initial begin
    logic [15:0] w, prev;
    rst = 1; valid = 1; d = instr_t'(16'h1234);
    @(posedge clk); #1;
    expect_q(16'h7000);
    rst = 0;
    @(posedge clk); #1;
    expect_q(16'h1234);
    prev = 16'h1234;
    for (int n = 0; n < 500; n++) begin
      w = 16'($urandom);
      valid = ($urandom_range(0, 3) != 0);
      d = instr_t'(w);
      #3;
      expect_q(prev);            // holds until the edge
      @(posedge clk); #1;
      prev = valid ? w : 16'h7000;
      expect_q(prev);
    end
    rst = 1; @(posedge clk); #1;
    expect_q(16'h7000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
