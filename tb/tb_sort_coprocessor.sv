// tb_sort_coprocessor: bus-level use of the sorter port as the processor
// sees it: clear (sw 0x8000), 32 key writes (sw 0x8001), status polling
// (lw 0x8000), sorted reads (lw 0x8001, each one clock of the pipeline),
// and that other I/O addresses have no effect.
module tb_sort_coprocessor;
  logic clk = 0, we = 0, re = 0;
  logic [15:0] a_bus = 0, d_o = 0, d_i;
  int checks = 0, failures = 0;

  sort_coprocessor dut (.clk(clk), .a_bus(a_bus), .d_bus_o(d_o), .io_we(we), .io_re(re), .d_bus_i(d_i));
  always #5 clk = ~clk;

  task automatic store(logic [15:0] a, logic [15:0] d);
    a_bus = a; d_o = d; we = 1; @(posedge clk); #1; we = 0;
  endtask
  task automatic load(logic [15:0] a, output logic [15:0] d);
    a_bus = a; re = 1; #1; d = d_i; @(posedge clk); #1; re = 0;
  endtask

  initial begin
    logic [15:0] v;
    for (int run = 0; run < 3; run++) begin
      int keys [$];
      int polls = 0;
      keys.delete(); polls = 0;
      store(16'h8000, 16'h8000);                 // clear
      load(16'h8000, v); checks++; if (v !== 0) begin failures++; $display("FAIL status after clear %h", v); end
      for (int i = 0; i < 32; i++) begin
        int k = int'($urandom % 65536);
        keys.push_back(k);
        store(16'h8001, 16'(k));
        if (i == 7) store(16'h8002, 16'h1234);   // unrelated I/O address: ignored
      end
      keys.rsort();
      // poll as the example program does: clock, then read status
      do begin
        load(16'h8001, v); load(16'h8000, v); polls++;
      end while (v == 0 && polls < 20);
      checks++; if (polls != 5) begin failures++; $display("FAIL first key after %0d pulses, expected 5", polls); end
      for (int k = 0; k < 32; k++) begin
        load(16'h8000, v); checks++; if (v !== 16'd1) begin failures++; $display("FAIL status %h", v); end
        load(16'h8001, v); checks++;
        if (v !== 16'(keys[k])) begin failures++; $display("FAIL key %0d = %h exp %h", k, v, keys[k]); end
      end
      load(16'h8000, v); checks++; if (v !== 0) begin failures++; $display("FAIL status after last %h", v); end
    end
    // clear in the middle of a sort empties the tree
    for (int i = 0; i < 32; i++) store(16'h8001, 16'(i + 1));
    repeat (3) load(16'h8001, v);
    store(16'h8000, 0);
    repeat (6) load(16'h8001, v);
    load(16'h8000, v); checks++; if (v !== 0) begin failures++; $display("FAIL clear mid-sort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
