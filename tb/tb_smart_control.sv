// tb_smart_control: decoding of every instruction kind, the branch decision,
// sff/rtn on offset 0, and the two-cycle long branch (balPrevious).
module tb_smart_control;
  import smart_pkg::*;
  import tb_smart_asm::*;
  logic clk = 0, rst = 1, en = 1, eq = 0;
  logic [15:0] instr = 0;
  ctrl_t c;
  logic sb;
  int checks = 0, failures = 0;

  smart_control dut (.clk(clk), .rst(rst), .en(en), .instr(instr), .eq(eq), .ctrl(c), .successful_b(sb));
  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b (instr %h)", what, got, exp, instr); end
  endtask

  task automatic set(logic [15:0] i, logic e); instr = i; eq = e; #1; endtask
  task automatic tick; @(posedge clk); #1; endtask

  initial begin
    tick; rst = 0;
    // R-type functions
    begin
      logic [3:0] fns [7] = '{F_ADD, F_SUB, F_AND, F_OR, F_NAND, F_NOR, F_SLT};
      alu_op_e    ops [7] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NAND, ALU_NOR, ALU_SLT};
      for (int k = 0; k < 7; k++) begin
        set(rtype(fns[k], 4'd3, 4'd6, k[0]), 0);
        checks++; if (c.alu_op !== ops[k]) begin failures++; $display("FAIL fn %h", fns[k]); end
        chk("R we", c.we_rf, 1); chk("R toreg", c.alu_to_reg, 1); chk("R rl", c.is_rl, 1);
        chk("R cdr", c.cdr, k[0]); chk("R sb", sb, 0);
        tick;
      end
    end
    set(16'h0008, 0); checks++; if (c.alu_op !== ALU_SUB) failures++;   // sub R0, R0 of the example
    // addi / lw / sw from the example
    set(16'h977F, 0); checks++; if (c.alu_src_n !== SRCN_IMM || c.alu_op !== ALU_ADD) failures++;
    chk("addi we", c.we_rf, 1); chk("addi toreg", c.alu_to_reg, 1);
    set(16'h4020, 0); chk("lw read", c.mem_read, 1); chk("lw we", c.we_rf, 1); chk("lw toreg", c.alu_to_reg, 0);
    set(16'h5160, 0); chk("sw write", c.mem_write, 1); chk("sw we", c.we_rf, 0); chk("sw rl", c.is_rl, 1);
    // beq / bne decisions
    set(16'hAE8D, 1); chk("beq taken", sb, 1); chk("beq branch", c.is_branch, 1); chk("beq we", c.we_rf, 0);
    set(16'hAE8D, 0); chk("beq not taken", sb, 0);
    set(16'hBF8C, 0); chk("bne taken", sb, 1);
    set(16'hBF8C, 1); chk("bne not taken", sb, 0);
    // sff and rtn
    set(sff(1, 0), 0); chk("sff", c.is_sff, 1); chk("sff sb", sb, 0); chk("sff rl", c.is_rl, 0);
    set(rtn(), 0); chk("rtn", c.rtn, 1); chk("rtn we", c.we_rf, 0);
    // unused opcode
    set(16'h6123, 0); chk("nop we", c.we_rf, 0); chk("nop wr", c.mem_write, 0);
    // baleq taken: first word, then the offset word
    tick;
    set(btype(BEQ, 3'd1, 3'd2, -1), 1); chk("bal1 sb", sb, 0); chk("bal1 prev", c.bal_previous, 0);
    tick;
    set(16'h0123, 0); chk("bal2 prev", c.bal_previous, 1); chk("bal2 sb", sb, 1);
    chk("bal2 link", c.we_rf, 1); chk("bal2 r1", c.force_r1_wr, 1); chk("bal2 pc", c.alu_m_pc, 1);
    chk("bal2 long", c.boffset_long, 1); checks++; if (c.alu_src_n !== SRCN_ONE) failures++;
    tick;
    chk("after bal", c.bal_previous, 0);
    // balne not taken (Rs == Rd)
    set(btype(BNE, 3'd1, 3'd2, -1), 1); tick;
    set(16'h0040, 0); chk("balne2 prev", c.bal_previous, 1); chk("balne2 sb", sb, 0); chk("balne2 we", c.we_rf, 0);
    tick;
    // enable low holds the cell
    set(btype(BNE, 3'd1, 3'd2, -1), 0); en = 0; tick; set(16'h0008, 0);
    chk("hold", c.bal_previous, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
