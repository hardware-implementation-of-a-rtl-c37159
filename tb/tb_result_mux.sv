// Self-checking testbench of the result multiplexer: each select code with
// random, distinct inputs.
module tb_result_mux;
  import cop_pkg::*;

  mux_ctrl_e sel;
  word_t a, s, l, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  result_mux dut (.sel(sel), .alu_out(a), .shf_out(s), .lut_out(l), .res(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      word_t exp;
      a = 16'($urandom); s = a ^ 16'h5a5a; l = a ^ 16'hc3c3;
      sel = mux_ctrl_e'(n % 4);
      #1;
      case (n % 4)
        1: exp = a;
        2: exp = s;
        3: exp = l;
        default: exp = 16'h0000;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%0d got %h expected %h", n % 4, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
