// tb_smart_regfile: random writes and reads of the 16 x 16 register file
// against a model array; checks reset and that a write lands at the edge.
module tb_smart_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] a1, a2, a3;
  logic [15:0] d3, r1, r2;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  smart_regfile dut (.clk(clk), .rst(rst), .we(we), .a1(a1), .a2(a2), .a3(a3), .d3(d3),
                     .rdata1(r1), .rdata2(r2));
  always #5 clk = ~clk;

  initial begin
    a1 = 0; a2 = 0; a3 = 0; d3 = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      model[i] = 0; a1 = 4'(i); a2 = 4'(15 - i); #1;
      checks++; if (r1 !== 0 || r2 !== 0) begin failures++; $display("FAIL reset R%0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom % 3) != 0; a3 = 4'($urandom); d3 = 16'($urandom);
      a1 = 4'($urandom); a2 = (i % 4 == 0) ? a3 : 4'($urandom);
      #1;
      checks++;
      if (r1 !== model[a1] || r2 !== model[a2]) begin
        failures++; $display("FAIL read a1=%0d %h/%h a2=%0d %h/%h", a1, r1, model[a1], a2, r2, model[a2]);
      end
      @(posedge clk);
      if (we) model[a3] = d3;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
