// tb_smart_init_rom: the data ROM holds the port address, key count, output
// pointer and, at words 10..41, the 32 example keys (each exactly once).
module tb_smart_init_rom;
  logic [6:0] addr;
  logic [15:0] data;
  int checks = 0, failures = 0;
  logic [15:0] keys [32] = '{16'h0009, 16'h0011, 16'h0014, 16'h0018, 16'h0019, 16'h0020,
    16'h0023, 16'h0024, 16'h0028, 16'h0029, 16'h0031, 16'h0064, 16'h0102, 16'h0126,
    16'h0203, 16'h0314, 16'h0415, 16'h0422, 16'h0428, 16'h0430, 16'h0443, 16'h0517,
    16'h0576, 16'h0621, 16'h0732, 16'h0812, 16'h2001, 16'h2006, 16'h3025, 16'h4005,
    16'h6007, 16'h7027};
  int seen [32];

  smart_init_rom dut (.addr(addr), .data(data));

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int a = 0; a < 128; a++) begin
      addr = 7'(a); #1;
      checks++;
      if (a == 0 && data !== 16'h8000) failures++;
      else if (a == 1 && data !== 16'd32) failures++;
      else if (a == 2 && data !== 16'd42) failures++;
      else if (a >= 10 && a <= 41) begin
        int hit = 0;
        foreach (keys[k]) if (keys[k] == data) begin seen[k]++; hit = 1; end
        if (!hit) begin failures++; $display("FAIL unknown key %h at %0d", data, a); end
      end else if (a > 2 && (a < 10 || a > 41) && data !== 0) failures++;
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] != 1) begin failures++; $display("FAIL key %h seen %0d times", keys[k], seen[k]); end
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
