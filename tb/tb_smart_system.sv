// tb_smart_system: end-to-end test of SMaRT with the sorting coprocessor at
// the default sizes, driven only through the board controls.
// Phase 1 runs the built-in sorting example: GO copies the data ROM, three
// Step presses execute the first three instructions, Run executes the rest
// (309 instructions in all until the final idle loop is reached), GO stops,
// and the 32 sorted keys are read back at words 42..73 through the Manual
// address switches. Phase 2 loads a second program that calls a subroutine
// with baleq, returns with rtn, skips a not-taken balne, uses 2.5-address
// add/sub/slt, sff and a branch on the upper register half, and sorts four
// keys (fewer than 32) with the coprocessor. Every mechanism is counted and
// must occur.
module tb_smart_system;
  import tb_smart_asm::*;
  logic clk = 0, rst = 1, run_n = 1, go_n = 1, step_n = 1, sw16 = 0, sw17 = 0;
  logic [6:0] man = 0;
  logic [15:0] dhi, dlo;
  logic [7:0] st;
  logic li, lr, ls;
  int checks = 0, failures = 0;

  smart_system dut (.clk(clk), .pc_reset(rst), .key_run_n(run_n), .key_go_n(go_n), .key_step_n(step_n),
    .sw16(sw16), .sw17(sw17), .sw_man_adrs(man), .disp_hi(dhi), .disp_lo(dlo), .led_state(st),
    .led_init(li), .led_run(lr), .led_step(ls));
  always #5 clk = ~clk;

  // ---------------- mechanism counters
  bit copied [128];
  int n_init_copy, n_step, n_run, n_manual, n_clear, n_keywr, n_en, n_status;
  int n_cdr, n_sff, n_rtn, n_bal_taken, n_bal_not, n_upper_branch, n_taken, n_not_taken;
  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.init_sel) begin n_init_copy++; copied[dut.u_cpu.init_adrs] = 1; end
    if (st == 8'h81) n_step++;
    if (st == 8'h84) n_run++;
    if (dut.u_cpu.cpu_en) begin
      if (dut.u_cpu.ctrl.cdr) n_cdr++;
      if (dut.u_cpu.ctrl.is_sff) n_sff++;
      if (dut.u_cpu.ctrl.rtn) n_rtn++;
      if (dut.u_cpu.ctrl.bal_previous && dut.u_cpu.successful_b) n_bal_taken++;
      if (dut.u_cpu.ctrl.bal_previous && !dut.u_cpu.successful_b) n_bal_not++;
      if (dut.u_cpu.ctrl.is_branch && (dut.u_cpu.radrs1[3] || dut.u_cpu.radrs2[3])) n_upper_branch++;
      if (dut.u_cpu.ctrl.is_branch && !dut.u_cpu.ctrl.bal_previous) begin
        if (dut.u_cpu.successful_b) n_taken++; else n_not_taken++;
      end
    end
    if (dut.u_sorter.clear) n_clear++;
    if (dut.u_sorter.we) n_keywr++;
    if (dut.u_sorter.en) n_en++;
    if (dut.u_cpu.io_re && dut.u_cpu.a_bus == 16'h8000) n_status++;
  end

  task automatic cyc(int n); repeat (n) @(posedge clk); #1; endtask
  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask
  task automatic press_go;   go_n = 0;   cyc(3); go_n = 1;   cyc(1); endtask
  task automatic press_step; step_n = 0; cyc(3); step_n = 1; cyc(3); endtask
  task automatic press_run;  run_n = 0;  cyc(3); run_n = 1;  cyc(1); endtask
  // read a data-memory word through the Manual switches
  task automatic manual_read(int a, output logic [15:0] v);
    sw17 = 1; man = 7'(a); #1; v = dlo; n_manual++; sw17 = 0; man = 0;
  endtask

  // sorted keys as printed for words 42..73 of the example's result
  logic [15:0] sorted [32] = '{16'h7027, 16'h6007, 16'h4005, 16'h3025, 16'h2006, 16'h2001,
    16'h0812, 16'h0732, 16'h0621, 16'h0576, 16'h0517, 16'h0443, 16'h0430, 16'h0428, 16'h0422,
    16'h0415, 16'h0314, 16'h0203, 16'h0126, 16'h0102, 16'h0064, 16'h0031, 16'h0029, 16'h0028,
    16'h0024, 16'h0023, 16'h0020, 16'h0019, 16'h0018, 16'h0014, 16'h0011, 16'h0009};

  initial begin
    logic [15:0] v;
    int cycles;
    foreach (copied[a]) copied[a] = 0;
    {n_init_copy, n_step, n_run, n_manual, n_clear, n_keywr, n_en, n_status} = '0;
    {n_cdr, n_sff, n_rtn, n_bal_taken, n_bal_not, n_upper_branch, n_taken, n_not_taken} = '0;
    cyc(2); rst = 0; cyc(1);
    chk("reset state", 16'(st), 16'h7F); chk("init LED", 16'(li), 1);

    // ---- Init: GO copies the data ROM
    go_n = 0; cyc(140); go_n = 1; cyc(2);
    chk("back in Init", 16'(st), 16'h7F);
    begin
      int nw = 0;
      foreach (copied[a]) nw += int'(copied[a]);
      chk("distinct words copied", 16'(nw), 16'd127);
    end
    manual_read(0, v);  chk("dMem[0]", v, 16'h8000);
    manual_read(1, v);  chk("dMem[1]", v, 16'd32);
    manual_read(2, v);  chk("dMem[2]", v, 16'd42);
    for (int a = 10; a < 42; a++) begin
      manual_read(a, v); chk($sformatf("dMem[%0d]", a), v, smart_pkg::example_key(a - 10));
    end

    // ---- Step: three instructions, one per press
    chk("PC before step", dhi, 16'd0);
    sw16 = 1; #1; chk("instr display", dhi, 16'h0008); sw16 = 0;
    for (int k = 1; k <= 3; k++) begin
      press_step; #1;
      chk("step LED", 16'(ls), 1);
      chk($sformatf("PC after step %0d", k), dhi, 16'(k));
    end
    chk("R0 after sub", dut.u_cpu.u_rf.regs[0], 16'd0);
    chk("R2 = reset port", dut.u_cpu.u_rf.regs[2], 16'h8000);
    chk("R1 = data port", dut.u_cpu.u_rf.regs[1], 16'h8001);

    // ---- Run until the idle loop (PC 18) is first reached
    run_n = 0; cyc(2); run_n = 1;
    cycles = 0;
    while (st != 8'h84) cyc(1);
    while (dhi != 16'd18 && cycles < 2000) begin cyc(1); cycles++; end
    chk("instructions executed to reach the idle loop", 16'(cycles + 3), 16'd309);
    chk("sorter EN pulses", 16'(n_en), 16'd37);
    chk("keys written", 16'(n_keywr), 16'd32);
    cyc(20);
    checks++; if (dhi != 16'd17 && dhi != 16'd18) begin failures++; $display("FAIL not idling: PC %h", dhi); end
    go_n = 0; cyc(2); go_n = 1; cyc(2);
    chk("stopped", 16'(st), 16'h7F);
    for (int k = 0; k < 32; k++) begin
      manual_read(42 + k, v); chk($sformatf("sorted word %0d", 42 + k), v, sorted[k]);
    end
    for (int a = 10; a < 42; a++) begin
      manual_read(a, v); chk($sformatf("keys kept %0d", a), v, smart_pkg::example_key(a - 10));
    end

    // ---- Phase 2: subroutine, long branches, 2.5-address, sff, 4-key sort
    rst = 1; cyc(1); rst = 0;
    for (int a = 0; a < 256; a++) dut.u_cpu.u_imem.mem[a] = 16'h0000;
    dut.u_cpu.u_imem.mem[0]  = rtype(F_SUB, 4'd0, 4'd0, 0);   // R0 = 0
    dut.u_cpu.u_imem.mem[1]  = lsi(LW, 4'd2, 4'd0, 0);        // R2 = 0x8000
    dut.u_cpu.u_imem.mem[2]  = lsi(ADDI, 4'd3, 4'd2, 1);      // R3 = 0x8001
    dut.u_cpu.u_imem.mem[3]  = lsi(SW, 4'd2, 4'd2, 0);        // clear the sorter
    dut.u_cpu.u_imem.mem[4]  = lsi(ADDI, 4'd4, 4'd0, 9);      // R4 = 9
    dut.u_cpu.u_imem.mem[5]  = rtype(F_ADD, 4'd4, 4'd4, 1);   // add+R4, R4: R5 = 18
    dut.u_cpu.u_imem.mem[6]  = btype(BEQ, 3'd0, 3'd0, -1);    // baleq R0, R0 -> 40
    dut.u_cpu.u_imem.mem[7]  = 16'd32;
    dut.u_cpu.u_imem.mem[8]  = btype(BNE, 3'd0, 3'd0, -1);    // balne R0, R0: not taken
    dut.u_cpu.u_imem.mem[9]  = 16'd100;
    dut.u_cpu.u_imem.mem[10] = sff(1, 1);                     // upper half
    dut.u_cpu.u_imem.mem[11] = btype(BEQ, 3'd0, 3'd0, 1);     // beq R8, R8: skip 12
    dut.u_cpu.u_imem.mem[12] = lsi(ADDI, 4'd12, 4'd0, 1);
    dut.u_cpu.u_imem.mem[13] = lsi(LW, 4'd6, 4'd3, 0);        // clock the sorter
    dut.u_cpu.u_imem.mem[14] = lsi(LW, 4'd6, 4'd2, 0);        // status
    dut.u_cpu.u_imem.mem[15] = btype(BEQ, 3'd6, 3'd0, -3);    // wait while invalid
    dut.u_cpu.u_imem.mem[16] = lsi(LW, 4'd10, 4'd0, 2);       // R10 = 42
    dut.u_cpu.u_imem.mem[17] = lsi(LW, 4'd7, 4'd3, 0);        // key
    dut.u_cpu.u_imem.mem[18] = lsi(SW, 4'd7, 4'd10, 0);
    dut.u_cpu.u_imem.mem[19] = lsi(ADDI, 4'd10, 4'd10, 1);
    dut.u_cpu.u_imem.mem[20] = lsi(LW, 4'd7, 4'd2, 0);        // status
    dut.u_cpu.u_imem.mem[21] = btype(BNE, 3'd7, 3'd0, -5);    // repeat while valid
    dut.u_cpu.u_imem.mem[22] = btype(BEQ, 3'd0, 3'd0, -2);    // idle
    dut.u_cpu.u_imem.mem[40] = lsi(SW, 4'd4, 4'd3, 0);        // push 9
    dut.u_cpu.u_imem.mem[41] = lsi(SW, 4'd5, 4'd3, 0);        // push 18
    dut.u_cpu.u_imem.mem[42] = rtype(F_SUB, 4'd5, 4'd4, 1);   // sub+R5, R4: R6 = 9 - 18
    dut.u_cpu.u_imem.mem[43] = lsi(SW, 4'd6, 4'd3, 0);        // push 0xFFF7
    dut.u_cpu.u_imem.mem[44] = rtype(F_SLT, 4'd5, 4'd4, 1);   // slt+R5, R4: R6 = (9 < 18) = 1
    dut.u_cpu.u_imem.mem[45] = lsi(SW, 4'd6, 4'd3, 0);        // push 1
    dut.u_cpu.u_imem.mem[46] = rtn();
    press_run;
    cyc(150);
    go_n = 0; cyc(2); go_n = 1; cyc(2);
    chk("phase 2 link R1", dut.u_cpu.u_rf.regs[1], 16'd8);
    chk("phase 2 R4 kept", dut.u_cpu.u_rf.regs[4], 16'd9);
    chk("phase 2 skipped word 12", dut.u_cpu.u_rf.regs[12], 16'd0);
    begin
      logic [15:0] exp4 [5] = '{16'hFFF7, 16'd18, 16'd9, 16'd1, 16'h2006};
      for (int k = 0; k < 5; k++) begin manual_read(42 + k, v); chk($sformatf("phase 2 word %0d", 42 + k), v, exp4[k]); end
    end

    // ---- every mechanism must have occurred
    begin
      string names [16] = '{"init copy", "step cycle", "run cycle", "manual read", "sorter clear",
        "key write", "sorter EN", "status read", "2.5-address", "sff", "rtn", "long branch taken",
        "long branch not taken", "branch on upper half", "short branch taken", "short branch not taken"};
      int counts [16];
      counts = '{n_init_copy, n_step, n_run, n_manual, n_clear, n_keywr, n_en, n_status, n_cdr,
                 n_sff, n_rtn, n_bal_taken, n_bal_not, n_upper_branch, n_taken, n_not_taken};
      for (int k = 0; k < 16; k++) begin
        $display("mechanism %-24s %0d", names[k], counts[k]);
        checks++; if (counts[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
