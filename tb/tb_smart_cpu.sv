// tb_smart_cpu: runs the processor in Run mode in lockstep with an
// instruction-level model written here. After every enabled cycle the PC and
// all 16 registers are compared, every I/O write is compared, and the data
// memory is compared at the end of each program. A directed program covers
// the examples of 2.5-address use, msb carry-over, sff, rtn and both long
// branches; random programs follow. An I/O device model answers loads from
// I/O addresses with (address ^ 0x5A5A). Each instruction kind must occur.
module tb_smart_cpu;
  import tb_smart_asm::*;
  logic clk = 0, rst = 1, run_n = 1, go_n = 1, step_n = 1;
  logic [15:0] a_bus, d_o, d_i, dhi, dlo;
  logic io_re, io_we, li, lr, ls;
  logic [7:0] st;
  int checks = 0, failures = 0;

  smart_cpu dut (.clk(clk), .pc_reset(rst), .key_run_n(run_n), .key_go_n(go_n), .key_step_n(step_n),
    .sw16(1'b0), .sw17(1'b0), .sw_man_adrs(7'd0), .a_bus(a_bus), .d_bus_o(d_o), .d_bus_i(d_i),
    .io_re(io_re), .io_we(io_we), .disp_hi(dhi), .disp_lo(dlo), .led_state(st),
    .led_init(li), .led_run(lr), .led_step(ls));
  always #5 clk = ~clk;
  assign d_i = a_bus ^ 16'h5A5A;

  // ---------------- reference model
  logic [15:0] prog [256];
  logic [15:0] m_reg [16];
  logic [15:0] m_mem [128];
  logic [15:0] m_pc;
  logic m_msr, m_msd, m_bal, m_balc;
  logic m_io_we; logic [15:0] m_io_a, m_io_d;
  int cov [string];

  function automatic logic [15:0] sx5(logic [15:0] i); return {{11{i[15]}}, i[15], i[3:0]}; endfunction
  function automatic logic [15:0] sx7(logic [15:0] i); return {{9{i[15]}}, i[15], i[11], i[7], i[3:0]}; endfunction

  task automatic model_step();
    logic [15:0] i, a, b, r, adr, off;
    logic [3:0] rs, rd, dst;
    logic cond;
    i = prog[m_pc[7:0]];
    m_io_we = 0;
    if (m_bal) begin
      cov[m_balc ? "bal_taken" : "bal_not_taken"]++;
      if (m_balc) begin m_reg[1] = m_pc + 1; m_pc = m_pc + 1 + i; end
      else m_pc = m_pc + 1;
      m_bal = 0;
      return;
    end
    rs = i[11:8]; rd = i[7:4];
    unique case (i[14:12])
      3'b000: begin
        a = m_reg[rs]; b = m_reg[rd];
        case (i[3:0])
          F_SUB:  begin r = a - b; cov["sub"]++; end
          F_AND:  begin r = a & b; cov["and"]++; end
          F_OR:   begin r = a | b; cov["or"]++; end
          F_NAND: begin r = ~(a & b); cov["nand"]++; end
          F_NOR:  begin r = ~(a | b); cov["nor"]++; end
          F_SLT:  begin r = ($signed(a) < $signed(b)) ? 16'd1 : 16'd0; cov["slt"]++; end
          default: begin r = a + b; cov["add"]++; end
        endcase
        dst = i[15] ? {rd[3], 3'(rd[2:0] + 3'd1)} : rd;
        if (i[15]) cov["cdr"]++;
        m_reg[dst] = r; m_msr = i[11]; m_msd = i[7]; m_pc++;
      end
      3'b001: begin m_reg[rd] = m_reg[rs] + sx5(i); m_msr = i[11]; m_msd = i[7]; m_pc++; cov["addi"]++; end
      3'b100: begin
        adr = m_reg[rs] + sx5(i);
        if (adr[15]) begin m_reg[rd] = adr ^ 16'h5A5A; cov["lw_io"]++; end
        else begin m_reg[rd] = m_mem[adr[6:0]]; cov["lw"]++; end
        m_msr = i[11]; m_msd = i[7]; m_pc++;
      end
      3'b101: begin
        adr = m_reg[rs] + sx5(i);
        if (adr[15]) begin m_io_we = 1; m_io_a = adr; m_io_d = m_reg[rd]; cov["sw_io"]++; end
        else begin m_mem[adr[6:0]] = m_reg[rd]; cov["sw"]++; end
        m_msr = i[11]; m_msd = i[7]; m_pc++;
      end
      3'b010, 3'b011: begin
        off = sx7(i);
        rs = {m_msr, i[10:8]}; rd = {m_msd, i[6:4]};
        cond = (m_reg[rs] == m_reg[rd]) ^ i[12];
        if (off == 0) begin
          if (!i[12]) begin m_msr = i[10]; m_msd = i[9]; m_pc++; cov["sff"]++; end
          else begin m_pc = m_reg[1]; cov["rtn"]++; end
        end else if (off == 16'hFFFF) begin
          m_bal = 1; m_balc = cond; m_pc++; cov[i[12] ? "balne" : "baleq"]++;
        end else begin
          if (cond) cov["branch_taken"]++; else cov["branch_not_taken"]++;
          if (rs[3] || rd[3]) cov["branch_upper_half"]++;
          m_pc = cond ? m_pc + 1 + off : m_pc + 1;
        end
      end
      default: begin m_pc++; cov["unused_op"]++; end
    endcase
  endtask

  task automatic compare_state(string tag);
    checks++;
    if (dut.u_pc.pc !== m_pc) begin failures++; $display("FAIL %s pc %h exp %h", tag, dut.u_pc.pc, m_pc); end
    for (int r = 0; r < 16; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== m_reg[r]) begin
        failures++; $display("FAIL %s R%0d %h exp %h (pc %h)", tag, r, dut.u_rf.regs[r], m_reg[r], m_pc);
      end
    end
  endtask

  // run one program: reset, load, Run, lockstep for n cycles, stop
  task automatic run_prog(string tag, int n);
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int a = 0; a < 256; a++) dut.u_imem.mem[a] = prog[a];
    for (int a = 0; a < 128; a++) begin m_mem[a] = 16'($urandom); dut.u_dmem.mem[a] = m_mem[a]; end
    foreach (m_reg[r]) m_reg[r] = 0;
    m_pc = 0; m_msr = 0; m_msd = 0; m_bal = 0; m_balc = 0;
    run_n = 0; @(posedge clk); #1; run_n = 1; @(posedge clk); #1;
    checks++; if (st !== 8'h84) begin failures++; $display("FAIL not in Run mode: %h", st); end
    for (int c = 0; c < n; c++) begin
      logic [15:0] pa, pd; logic pw;
      model_step();
      pw = io_we; pa = a_bus; pd = d_o;
      checks++;
      if (pw !== m_io_we || (pw && (pa !== m_io_a || pd !== m_io_d))) begin
        failures++; $display("FAIL %s io write %b %h %h exp %b %h %h", tag, pw, pa, pd, m_io_we, m_io_a, m_io_d);
      end
      @(posedge clk); #1;
      compare_state(tag);
    end
    go_n = 0; @(posedge clk); #1; go_n = 1; @(posedge clk); #1;
    for (int a = 0; a < 128; a++) begin
      checks++;
      if (dut.u_dmem.mem[a] !== m_mem[a]) begin failures++; $display("FAIL %s mem[%0d] %h exp %h", tag, a, dut.u_dmem.mem[a], m_mem[a]); end
    end
  endtask

  function automatic logic [15:0] rand_instr();
    int k = $urandom % 20;
    logic [3:0] fns [7] = '{F_ADD, F_SUB, F_AND, F_OR, F_NAND, F_NOR, F_SLT};
    if (k < 7)  return rtype(fns[$urandom % 7], 4'($urandom), 4'($urandom), 1'($urandom));
    if (k < 10) return lsi(ADDI, 4'($urandom), 4'($urandom), int'($urandom % 32));
    if (k < 12) return lsi(LW, 4'($urandom), 4'($urandom), int'($urandom % 32));
    if (k < 14) return lsi(SW, 4'($urandom), 4'($urandom), int'($urandom % 32));
    if (k < 17) return btype(($urandom % 2) ? BNE : BEQ, 3'($urandom), 3'($urandom), int'($urandom % 128));
    if (k == 17) return sff(1'($urandom), 1'($urandom));
    if (k == 18) return btype(($urandom % 2) ? BNE : BEQ, 3'($urandom), 3'($urandom), -1);
    return ($urandom % 4 == 0) ? rtn() : 16'($urandom);
  endfunction

  initial begin
    string need [] = '{"add", "sub", "and", "or", "nand", "nor", "slt", "cdr", "addi", "lw", "lw_io",
                       "sw", "sw_io", "sff", "rtn", "baleq", "balne", "bal_taken", "bal_not_taken",
                       "branch_taken", "branch_not_taken", "branch_upper_half", "unused_op"};
    // ---- directed program
    foreach (prog[a]) prog[a] = 16'h0000;
    prog[0]  = lsi(ADDI, 4'd2, 4'd0, 7);          // R2 = R0 + 7
    prog[1]  = lsi(ADDI, 4'd5, 4'd0, -3);         // R5 = -3
    prog[2]  = rtype(F_ADD, 4'd2, 4'd5, 1);       // add+R2, R5 -> R3 = 4, R2 kept
    prog[3]  = lsi(ADDI, 4'd6, 4'd0, 12);         // R6 = 12
    prog[4]  = rtype(F_SUB, 4'd3, 4'd6, 1);       // sub+R3, R6 -> R4 = R6 - R3 = 8
    prog[5]  = rtype(F_SLT, 4'd15, 4'd2, 1);      // slt+R15, R2 -> R8 (wraps 1111 -> 1000)
    prog[6]  = lsi(ADDI, 4'd12, 4'd8, 0);         // R12 = R8; msbRs = 1, msbRd = 1
    prog[7]  = btype(BEQ, 3'd0, 3'd4, 2);         // beq R8, R12 (upper half): taken -> 10
    prog[8]  = lsi(ADDI, 4'd9, 4'd0, 1);          // skipped
    prog[9]  = lsi(ADDI, 4'd9, 4'd0, 2);          // skipped
    prog[10] = sff(0, 0);                         // back to the lower half
    prog[11] = btype(BNE, 3'd2, 3'd3, -1);        // balne R2, R3 (7 != 4): taken
    prog[12] = 16'd20;                            // -> 13 + 20 = 33, R1 = 13
    prog[13] = lsi(ADDI, 4'd10, 4'd0, 5);         // after return
    prog[14] = btype(BEQ, 3'd2, 3'd3, -1);        // baleq R2, R3: not taken
    prog[15] = 16'd100;                           // skipped offset word
    prog[16] = lsi(ADDI, 4'd11, 4'd0, -1);        // R11 = 0xFFFF
    prog[17] = lsi(SW, 4'd2, 4'd11, 2);           // sw R2, 2(R11): 0xFFFF + 2 = 0x0001, memory word 1
    prog[18] = lsi(ADDI, 4'd13, 4'd0, 1);
    prog[19] = rtype(F_NOR, 4'd14, 4'd0, 0);      // R14 = ~(R0 | R14) = 0xFFFF
    prog[20] = rtype(F_ADD, 4'd14, 4'd14, 0);     // R14 = 0xFFFE
    prog[21] = rtype(F_NOR, 4'd14, 4'd0, 0);      // R14 = ~(0|0xFFFE) = 1
    prog[22] = lsi(ADDI, 4'd7, 4'd0, 15);
    prog[33] = lsi(LW, 4'd9, 4'd11, 2);           // lw R9, 2(R11): memory word 1 (before the sw above)
    prog[34] = rtn();                             // back to R1 = 13
    run_prog("directed", 23);                   // ends with PC = 23
    // hand-computed values of the directed program
    checks++; if (dut.u_rf.regs[3] !== 16'd4)  begin failures++; $display("FAIL add+ R3"); end
    checks++; if (dut.u_rf.regs[2] !== 16'd7)  begin failures++; $display("FAIL add+ kept R2"); end
    checks++; if (dut.u_rf.regs[4] !== 16'd8)  begin failures++; $display("FAIL sub+ R4"); end
    checks++; if (dut.u_rf.regs[8] !== 16'd0)  begin failures++; $display("FAIL slt+ R8"); end
    checks++; if (dut.u_rf.regs[1] !== 16'd13) begin failures++; $display("FAIL link R1"); end
    checks++; if (dut.u_rf.regs[10] !== 16'd5) begin failures++; $display("FAIL after rtn"); end
    checks++; if (dut.u_dmem.mem[1] !== 16'd7) begin failures++; $display("FAIL sw"); end
    // ---- random programs
    for (int p = 0; p < 40; p++) begin
      foreach (prog[a]) prog[a] = rand_instr();
      // a few I/O accesses: R15 = 0x8000 | small
      prog[0] = lsi(ADDI, 4'd15, 4'd0, -16);      // R15 = 0xFFF0 (I/O addresses)
      run_prog($sformatf("random%0d", p), 300);
    end
    foreach (need[k]) begin
      checks++;
      if (!cov.exists(need[k])) begin failures++; $display("FAIL never executed: %s", need[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
