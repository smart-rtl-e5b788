// tb_smart_pc: sequential stepping, short/long branch targets, rtn, hold
// when not enabled, and reset of the program counter.
module tb_smart_pc;
  logic clk = 0, rst = 1, en = 0, sb = 0, rtn = 0;
  logic [15:0] boff = 0, rd1 = 0, pc, pc1, exp_pc;
  int checks = 0, failures = 0;

  smart_pc dut (.clk(clk), .rst(rst), .en(en), .successful_b(sb), .rtn(rtn),
                .boffset(boff), .rdata1(rd1), .pc(pc), .pc_plus1(pc1));
  always #5 clk = ~clk;

  task automatic step(logic e, logic s, logic r, logic [15:0] o, logic [15:0] d);
    en = e; sb = s; rtn = r; boff = o; rd1 = d;
    #1;
    checks++;
    if (pc1 !== 16'(exp_pc + 1)) begin failures++; $display("FAIL pc+1 %h", pc1); end
    if (e) exp_pc = r ? d : (s ? 16'(exp_pc + 1 + o) : 16'(exp_pc + 1));
    @(posedge clk); #1;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp_pc); end
  endtask

  initial begin
    exp_pc = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 5; i++) step(1, 0, 0, 0, 0);
    step(1, 1, 0, 16'hFFFC, 0);          // -4: back to PC+1-4
    step(0, 1, 0, 16'h0040, 16'h1234);   // disabled: holds
    step(1, 0, 1, 0, 16'h0077);          // rtn
    step(1, 1, 0, 16'h1000, 0);          // long offset
    for (int i = 0; i < 500; i++)
      step(($urandom % 4) != 0, $urandom % 2, ($urandom % 8) == 0, 16'($urandom), 16'($urandom));
    rst = 1; @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
