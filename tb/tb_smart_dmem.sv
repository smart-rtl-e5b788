// tb_smart_dmem: random writes through WE1 and WE2 and asynchronous reads of
// the 128-word data memory against a model.
module tb_smart_dmem;
  logic clk = 0, we1 = 0, we2 = 0;
  logic [6:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [128];
  int checks = 0, failures = 0;

  smart_dmem dut (.clk(clk), .we1(we1), .we2(we2), .addr(addr), .wdata(wdata), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    we2 = 1;
    for (int a = 0; a < 128; a++) begin
      addr = 7'(a); wdata = 16'(a * 3 + 1); model[a] = wdata;
      @(posedge clk); #1;
    end
    we2 = 0;
    for (int i = 0; i < 3000; i++) begin
      addr = 7'($urandom); wdata = 16'($urandom);
      we1 = ($urandom % 3) == 0; we2 = ($urandom % 7) == 0;
      #1; checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL %0d %h/%h", addr, rdata, model[addr]); end
      @(posedge clk);
      if (we1 || we2) model[addr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
