// End-to-end testbench of the coprocessor at its default size.
//
// Part 1 replays the ADD, SUB and LUT instruction sequences of the design's
// waveforms: the operands are loaded through the host port, the
// instruction is issued, and the destination register is read back and
// compared with the value worked out by hand. It also measures the latency
// from issuing an instruction to its result being readable (2 clock edges).
// Part 2 runs a long random stream of instructions of every opcode with
// random host loads, idle cycles and a mid-run reset, and compares RES,
// the write enable and random register reads every cycle with a cycle model
// built on the reference package. Each mechanism of the design is counted
// and a mechanism that never happened is a failure.
module tb_crypto_coprocessor;
  import cop_pkg::*;
  import cop_ref_pkg::*;

  logic      clk = 0, rst, valid, load_en, res_wen;
  instr_t    instr;
  reg_addr_t load_addr, rd_addr;
  word_t     load_data, rd_data, res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crypto_coprocessor dut (
    .clk(clk), .rst(rst), .instr_valid(valid), .instr(instr),
    .load_en(load_en), .load_addr(load_addr), .load_data(load_data),
    .rd_addr(rd_addr), .rd_data(rd_data), .res(res), .res_wen(res_wen));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    valid = 0; instr = instr_t'(16'h0000); load_en = 0; load_addr = 0; load_data = 0;
  endtask

  task automatic host_load(input logic [3:0] a, input logic [15:0] v);
    load_en = 1; load_addr = a; load_data = v;
    @(posedge clk); #1;
    load_en = 0;
  endtask

  task automatic expect_reg(input logic [3:0] a, input logic [15:0] v, input string what);
    rd_addr = a; #1;
    checks++;
    if (rd_data !== v) begin
      failures++;
      $display("FAIL %s: R%0d = %h, expected %h", what, a, rd_data, v);
    end
  endtask

  // load the two operands, issue one instruction, check Rd after two edges
  task automatic run_one(input logic [15:0] w, input logic [15:0] va,
                         input logic [15:0] vb, input logic [15:0] exp);
    host_load(w[7:4], va);
    if (w[3:0] != w[7:4]) host_load(w[3:0], vb);
    valid = 1; instr = instr_t'(w);
    @(posedge clk); #1;
    valid = 0;
    @(posedge clk); #1;
    expect_reg(w[11:8], exp, $sformatf("instr %h", w));
  endtask

  // ---------------- cycle model for part 2 ----------------
  logic [15:0] mregs [16];
  logic [15:0] mir;
  int cnt_op [16];
  int cnt_idle, cnt_collide, cnt_dep, cnt_reset, cnt_nowrite, cnt_load;

  initial begin
    logic [15:0] prev_w;
    int t0;

    idle_inputs(); rd_addr = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) expect_reg(4'(i), 16'h0000, "reset");

    // ADD waveform: operands and results as read from the waveform
    run_one(16'h0f12, 16'h000c, 16'h0002, 16'h000e);
    run_one(16'h0c69, 16'h0007, 16'h0001, 16'h0008);
    run_one(16'h0f18, 16'h0005, 16'h0002, 16'h0007);
    run_one(16'h0029, 16'h000c, 16'h0001, 16'h000d);
    run_one(16'h0d45, 16'h0008, 16'h0003, 16'h000b);
    run_one(16'h0a37, 16'h0006, 16'h0002, 16'h0008);
    run_one(16'h03e2, 16'h000c, 16'h0002, 16'h000e);
    run_one(16'h0c8b, 16'h000a, 16'h000d, 16'h0017);  // 16-bit sum, no wrap
    // SUB waveform
    run_one(16'h1f12, 16'h000c, 16'h0002, 16'h000a);
    run_one(16'h1c69, 16'h0007, 16'h0001, 16'h0006);
    run_one(16'h1f18, 16'h0005, 16'h0001, 16'h0004);
    run_one(16'h1029, 16'h000c, 16'h0002, 16'h000a);
    run_one(16'h1d45, 16'h0008, 16'h0003, 16'h0005);
    run_one(16'h1a37, 16'h0006, 16'h0002, 16'h0004);
    run_one(16'h13e2, 16'h000c, 16'h0002, 16'h000a);
    run_one(16'h1bc8, 16'h000a, 16'h0003, 16'h0007);
    // LUT waveform (only Ra matters)
    run_one(16'hbf12, 16'h000c, 16'h0002, 16'h0008);
    run_one(16'hbc69, 16'h0007, 16'h0001, 16'h000e);
    run_one(16'hbf18, 16'h0005, 16'h0002, 16'h0003);
    run_one(16'hb029, 16'h000a, 16'h0002, 16'h000c);
    run_one(16'hbd45, 16'h000a, 16'h0006, 16'h000c);
    run_one(16'hba37, 16'h0006, 16'h0003, 16'h0006);
    run_one(16'hb3e2, 16'h000f, 16'h000e, 16'h0004);
    run_one(16'hbbc8, 16'h000b, 16'h0003, 16'h000d);
    // 16-bit results of the other instructions, worked by hand
    run_one(16'h5a37, 16'h0006, 16'h0000, 16'hfff9);  // NOT
    run_one(16'h63e2, 16'h000f, 16'h0000, 16'h000f);  // MOV
    run_one(16'h4d45, 16'h000a, 16'h0003, 16'h0009);  // XOR
    run_one(16'h2f18, 16'h0005, 16'h0003, 16'h0001);  // AND
    run_one(16'h3029, 16'h0006, 16'h0002, 16'h0006);  // OR
    run_one(16'h8c69, 16'h0000, 16'h1234, 16'h3412);  // ROR8
    run_one(16'h9f03, 16'h0000, 16'habcd, 16'hdabc);  // ROR4
    run_one(16'haea7, 16'h0000, 16'h1234, 16'h3400);  // SLL8

    // latency: issue in one cycle, result readable after the second edge
    host_load(4'h1, 16'h0100);
    host_load(4'h2, 16'h0023);
    valid = 1; instr = instr_t'(16'h0512);
    rd_addr = 4'h5;
    t0 = 0;
    @(posedge clk); #1; valid = 0; t0++;
    checks++;
    if (rd_data === 16'h0123) begin failures++; $display("FAIL result after one edge"); end
    @(posedge clk); #1; t0++;
    checks++;
    if (rd_data !== 16'h0123 || t0 != 2) begin
      failures++; $display("FAIL latency: R5=%h after %0d edges", rd_data, t0);
    end

    // ---------------- part 2: random stream against the cycle model ----------
    rst = 1; idle_inputs(); @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) mregs[i] = 16'h0000;
    mir = 16'h7000;
    prev_w = 16'h7000;
    foreach (cnt_op[i]) cnt_op[i] = 0;
    cnt_idle = 0; cnt_collide = 0; cnt_dep = 0; cnt_reset = 0; cnt_nowrite = 0; cnt_load = 0;

    for (int n = 0; n < 20000; n++) begin
      logic [15:0] w, mres;
      logic        mwen, do_rst;
      // drive this cycle's inputs
      w = 16'($urandom);
      if ($urandom_range(0, 3) == 0) w[7:4] = prev_w[11:8];   // depend on last result
      valid   = ($urandom_range(0, 7) != 0);
      instr   = instr_t'(w);
      load_en = ($urandom_range(0, 3) == 0);
      load_addr = 4'($urandom);
      load_data = 16'($urandom);
      rd_addr = 4'($urandom);
      do_rst  = (n % 5000 == 4999);
      rst     = do_rst;
      // instruction in the input register this cycle
      ref_exec(mir[15:12], mregs[mir[7:4]], mregs[mir[3:0]], mwen, mres);
      if (!do_rst) load_addr = (n % 97 == 0 && mwen) ? mir[11:8] : load_addr;
      if (load_en && mwen && load_addr == mir[11:8]) cnt_collide++;
      #1;
      checks++;
      if (res_wen !== mwen || (mwen && res !== mres)) begin
        failures++;
        $display("FAIL cycle %0d instr %h: res=%h wen=%b, expected %h %b",
                 n, mir, res, res_wen, mres, mwen);
      end
      checks++;
      if (rd_data !== mregs[rd_addr]) begin
        failures++;
        $display("FAIL cycle %0d: R%0d = %h, expected %h", n, rd_addr, rd_data, mregs[rd_addr]);
      end
      @(posedge clk);
      // model the edge
      if (do_rst) begin
        for (int i = 0; i < 16; i++) mregs[i] = 16'h0000;
        mir = 16'h7000;
        cnt_reset++;
        prev_w = 16'h7000;
      end else begin
        cnt_op[mir[15:12]]++;
        if (!mwen) cnt_nowrite++;
        if (load_en) begin mregs[load_addr] = load_data; cnt_load++; end
        if (mwen) mregs[mir[11:8]] = mres;
        if (valid && prev_w[15:12] <= 4'hB && prev_w[15:12] != 4'h7 && w[7:4] == prev_w[11:8]) cnt_dep++;
        if (!valid) cnt_idle++;
        mir = valid ? w : 16'h7000;
        prev_w = mir;
      end
      #1;
    end
    idle_inputs();

    // every mechanism must have happened
    for (int op = 0; op < 16; op++) begin
      checks++;
      if (cnt_op[op] == 0) begin failures++; $display("FAIL opcode %0d never executed", op); end
    end
    checks++; if (cnt_idle == 0)    begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (cnt_nowrite == 0) begin failures++; $display("FAIL no non-writing instruction"); end
    checks++; if (cnt_collide == 0) begin failures++; $display("FAIL no load/result collision"); end
    checks++; if (cnt_dep == 0)     begin failures++; $display("FAIL no back-to-back dependency"); end
    checks++; if (cnt_reset == 0)   begin failures++; $display("FAIL no mid-run reset"); end
    checks++; if (cnt_load == 0)    begin failures++; $display("FAIL no host load"); end
    $display("executed per opcode: %p", cnt_op);
    $display("idle=%0d no-write=%0d load=%0d load/result collisions=%0d dependent=%0d resets=%0d",
             cnt_idle, cnt_nowrite, cnt_load, cnt_collide, cnt_dep, cnt_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
