// Self-checking testbench of S-Box 1: the mappings visible in the LUT
// instruction waveform, every entry of the table, and that the table is a
// permutation that keeps inputs below 16 below 16.
module tb_sbox1;
  import cop_ref_pkg::*;

  logic [4:0] din, dout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] seen;

  sbox1 dut (.din(din), .dout(dout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_map(input logic [4:0] i, input logic [4:0] o);
    din = i; #1; checks++;
    if (dout !== o) begin
      failures++;
      $display("FAIL sbox1(%h) = %h, expected %h", i, dout, o);
    end
  endtask

  initial begin
    // pairs read from the LUT waveform (input register value -> result)
    expect_map(5'h0c, 5'h08);
    expect_map(5'h07, 5'h0e);
    expect_map(5'h05, 5'h03);
    expect_map(5'h0a, 5'h0c);
    expect_map(5'h06, 5'h06);
    expect_map(5'h0f, 5'h04);
    expect_map(5'h0b, 5'h0d);
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      expect_map(5'(i), SBOX1_TAB[i]);
      seen[dout] = 1'b1;
      checks++;
      if ((i < 16) != (dout < 16)) begin
        failures++;
        $display("FAIL sbox1(%0d) = %0d crosses the 16 boundary", i, dout);
      end
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL sbox1 is not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
