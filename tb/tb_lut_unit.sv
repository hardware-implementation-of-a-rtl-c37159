// Self-checking testbench of the nonlinear lookup unit: the LUT results of
// the design's waveform for small operands, then random words against the
// reference split (upper six bits bypassed, two 5-bit substitutions below).
module tb_lut_unit;
  import cop_pkg::*;
  import cop_ref_pkg::*;

  word_t lutin, lutout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  lut_unit dut (.lutin(lutin), .lutout(lutout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t i, input word_t o);
    lutin = i; #1; checks++;
    if (lutout !== o) begin
      failures++;
      $display("FAIL lut(%h) = %h, expected %h", i, lutout, o);
    end
  endtask

  initial begin
    // operand -> result pairs from the LUT instruction waveform
    check(16'h000c, 16'h0008);
    check(16'h0007, 16'h000e);
    check(16'h0005, 16'h0003);
    check(16'h000a, 16'h000c);
    check(16'h0006, 16'h0006);
    check(16'h000f, 16'h0004);
    check(16'h000b, 16'h000d);
    // upper six bits pass, the S-boxes act on fields [9:5] and [4:0]
    check(16'hfc00, 16'hfc01);
    check(16'h0020, 16'h00c1);
    for (int n = 0; n < 3000; n++) begin
      word_t v;
      v = 16'($urandom);
      check(v, ref_lut(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
