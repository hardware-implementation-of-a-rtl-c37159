// Self-checking testbench of the combinational logic unit: random
// instructions of all sixteen opcodes with random operand buses, checked
// for the register addresses, the write enable and RES against the
// reference model.
module tb_comb_logic;
  import cop_pkg::*;
  import cop_ref_pkg::*;

  instr_t    instr;
  word_t     abus, bbus, res;
  reg_addr_t ra, rb, rd;
  logic      wen;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  comb_logic dut (.instr(instr), .abus(abus), .bbus(bbus), .ra(ra), .rb(rb),
                  .rd(rd), .wen(wen), .res(res));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [15:0] w, exp;
      logic        ew;
      w = {4'(n % 16), 12'($urandom)};
      instr = instr_t'(w);
      abus = 16'($urandom); bbus = 16'($urandom);
      #1;
      ref_exec(w[15:12], abus, bbus, ew, exp);
      checks++;
      if (wen !== ew || rd !== w[11:8] || ra !== w[7:4] || rb !== w[3:0]) begin
        failures++;
        $display("FAIL %h: wen=%b rd=%h ra=%h rb=%h", w, wen, rd, ra, rb);
      end
      if (ew) begin
        checks++;
        if (res !== exp) begin
          failures++;
          $display("FAIL %h a=%h b=%h: res=%h expected %h", w, abus, bbus, res, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
