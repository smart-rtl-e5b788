// tb_smart_imem: the instruction memory's default contents are the sorting
// program (machine code typed in here) followed by zeros.
module tb_smart_imem;
  logic [7:0] addr;
  logic [15:0] instr;
  int checks = 0, failures = 0;
  logic [15:0] prog [19] = '{16'h0008, 16'h4020, 16'h1211, 16'h5220, 16'h4071, 16'h977F,
                             16'h476A, 16'h5160, 16'hBF8C, 16'h4160, 16'h4260, 16'hAE8D,
                             16'h4072, 16'h4160, 16'h5760, 16'h1771, 16'h4260, 16'hBE8B,
                             16'hA88E};

  smart_imem dut (.addr(addr), .instr(instr));

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (instr !== ((a < 19) ? prog[a] : 16'h0000)) begin
        failures++; $display("FAIL addr %0d = %h", a, instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
