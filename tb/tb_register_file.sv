// Self-checking testbench of the register file: reset clears all sixteen
// registers; random writes through the result port and the host port,
// including both in one cycle to the same register (result wins), are
// checked on the three read ports against a model array.
module tb_register_file;
  logic        clk = 0, rst;
  logic [3:0]  ra, rb, rd, la, ha;
  logic [15:0] abus, bbus, res, ld, hd;
  logic        wen, le;
  logic [15:0] model [16];
  int checks = 0, failures = 0, same_cycle = 0;
  always #5 clk = ~clk;

  register_file dut (
    .clk(clk), .rst(rst), .ra(ra), .rb(rb), .abus(abus), .bbus(bbus),
    .wen(wen), .rd(rd), .res(res), .load_en(le), .load_addr(la), .load_data(ld),
    .host_raddr(ha), .host_rdata(hd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int k = 0; k < 4; k++) begin
      ra = 4'($urandom); rb = 4'($urandom); ha = 4'($urandom);
      #1;
      checks++;
      if (abus !== model[ra] || bbus !== model[rb] || hd !== model[ha]) begin
        failures++;
        $display("FAIL read ra=%h:%h rb=%h:%h ha=%h:%h", ra, abus, rb, bbus, ha, hd);
      end
    end
  endtask

  initial begin
    rst = 1; wen = 0; le = 0; rd = 0; la = 0; res = 0; ld = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 16; i++) model[i] = 16'h0000;
    for (int i = 0; i < 16; i++) begin
      ra = 4'(i); rb = 4'(15 - i); ha = 4'(i); #1;
      checks++;
      if (abus !== 0 || bbus !== 0 || hd !== 0) begin
        failures++; $display("FAIL R%0d not cleared by reset", i);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      wen = 1'($urandom_range(0, 1)); rd = 4'($urandom); res = 16'($urandom);
      le  = 1'($urandom_range(0, 1)); la = 4'($urandom); ld = 16'($urandom);
      if (n % 50 == 0) begin wen = 1; le = 1; la = rd; end
      if (wen && le && la == rd) same_cycle++;
      @(posedge clk);
      if (le)  model[la] = ld;
      if (wen) model[rd] = res;
      #1;
      wen = 0; le = 0;
      check_reads();
    end
    // reset again after random contents
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) model[i] = 16'h0000;
    check_reads();
    checks++;
    if (same_cycle == 0) begin failures++; $display("FAIL no same-register double write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
