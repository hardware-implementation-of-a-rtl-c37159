// Workload testbench: the twelve-instruction demonstration program
// (NOP, then one each of ADD, SUB, AND, OR, XOR, NOT, MOV, ROR8, ROR4, SLL8
// and LUT) issued back to back, one instruction per clock, on registers
// preloaded through the host port with small values. After the last
// instruction the sixteen registers are compared with an instruction-level
// model that executes the program one instruction at a time, and the run
// must take exactly one clock per instruction plus one of latency.
module tb_isa_program;
  import cop_pkg::*;
  import cop_ref_pkg::*;

  localparam int N = 12;
  localparam logic [15:0] PROGRAM [N] = '{
    16'h7000, 16'h0f12, 16'h1c69, 16'h2f18, 16'h3029, 16'h4d45,
    16'h5a37, 16'h63e2, 16'h8c8b, 16'h9f03, 16'haea7, 16'hb9d4};

  logic      clk = 0, rst, valid, load_en, res_wen;
  instr_t    instr;
  reg_addr_t load_addr, rd_addr;
  word_t     load_data, rd_data, res;
  logic [15:0] model [16];
  int checks = 0, failures = 0, edges = 0, writes = 0;
  always #5 clk = ~clk;

  crypto_coprocessor dut (
    .clk(clk), .rst(rst), .instr_valid(valid), .instr(instr),
    .load_en(load_en), .load_addr(load_addr), .load_data(load_data),
    .rd_addr(rd_addr), .rd_data(rd_data), .res(res), .res_wen(res_wen));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count write-backs as they happen
  always @(posedge clk) if (!rst && res_wen) writes++;

  initial begin
    logic        w_en;
    logic [15:0] w_val;
    valid = 0; instr = instr_t'(16'h7000); load_en = 0; load_addr = 0; load_data = 0; rd_addr = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    // preload R0..R15 with 1..16 times 3, a small spread of values
    for (int i = 0; i < 16; i++) begin
      model[i] = 16'((i + 1) * 3);
      load_en = 1; load_addr = 4'(i); load_data = model[i];
      @(posedge clk); #1;
    end
    load_en = 0;
    writes = 0;
    // instruction-level model
    for (int k = 0; k < N; k++) begin
      ref_exec(PROGRAM[k][15:12], model[PROGRAM[k][7:4]], model[PROGRAM[k][3:0]], w_en, w_val);
      if (w_en) model[PROGRAM[k][11:8]] = w_val;
    end
    // issue back to back
    for (int k = 0; k < N; k++) begin
      valid = 1; instr = instr_t'(PROGRAM[k]);
      @(posedge clk); #1; edges++;
    end
    valid = 0;
    @(posedge clk); #1; edges++;
    checks++;
    if (edges != N + 1 || writes != N - 1) begin
      failures++;
      $display("FAIL program took %0d edges with %0d writes, expected %0d and %0d",
               edges, writes, N + 1, N - 1);
    end
    for (int i = 0; i < 16; i++) begin
      rd_addr = 4'(i); #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("FAIL R%0d = %h, expected %h", i, rd_data, model[i]);
      end
    end
    $display("program of %0d instructions done in %0d clock edges", N, edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
