// Self-checking testbench of S-Box 2: zero maps to zero (so small operands
// leave LUTOUT[9:5] clear), every entry of the table, and that the table is
// a permutation of 0..31.
module tb_sbox2;
  import cop_ref_pkg::*;

  logic [4:0] din, dout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] seen;

  sbox2 dut (.din(din), .dout(dout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 5'h00; #1; checks++;
    if (dout !== 5'h00) begin failures++; $display("FAIL sbox2(0) = %h", dout); end
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      din = 5'(i); #1; checks++;
      if (dout !== SBOX2_TAB[i]) begin
        failures++;
        $display("FAIL sbox2(%h) = %h, expected %h", i, dout, SBOX2_TAB[i]);
      end
      seen[dout] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL sbox2 is not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
