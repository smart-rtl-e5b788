// tb_sort_tree: the 8-leaf example (keys 5 12 6 3 2 9 1 15: 15 reaches the
// root after 3 EN pulses) and random 32-key sets (largest key after 5
// pulses, then one key per pulse in descending order, then invalid). Each
// tree is driven with leaves held in a local register that obeys leaf_write.
module tb_sort_tree;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---------------- 8 leaves
  logic en8 = 0, clr8 = 1;
  logic [16:0] lv8 [8];
  logic [7:0] lw8;
  logic [16:0] root8;
  sort_tree #(.N(8), .KEY_W(16)) t8 (.clk(clk), .en(en8), .clear(clr8), .leaves(lv8), .leaf_write(lw8), .key_out(root8));
  always @(posedge clk) for (int i = 0; i < 8; i++) if (lw8[i]) lv8[i][16] <= 0;

  // ---------------- 32 leaves
  logic en32 = 0, clr32 = 1;
  logic [16:0] lv32 [32];
  logic [31:0] lw32;
  logic [16:0] root32;
  sort_tree #(.N(32), .KEY_W(16)) t32 (.clk(clk), .en(en32), .clear(clr32), .leaves(lv32), .leaf_write(lw32), .key_out(root32));
  always @(posedge clk) for (int i = 0; i < 32; i++) if (lw32[i]) lv32[i][16] <= 0;

  initial begin
    int fig [8] = '{5, 12, 6, 3, 2, 9, 1, 15};
    int exp8 [8] = '{15, 12, 9, 6, 5, 3, 2, 1};
    foreach (lv8[i]) lv8[i] = {1'b1, 16'(fig[i])};
    foreach (lv32[i]) lv32[i] = '0;
    @(posedge clk); #1 clr8 = 0; clr32 = 0;
    en8 = 1;
    for (int c = 1; c <= 3; c++) begin
      @(posedge clk); #1;
      checks++;
      if (root8[16] !== (c == 3)) begin failures++; $display("FAIL 8: root valid %b after %0d pulses", root8[16], c); end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (root8 !== {1'b1, 16'(exp8[k])}) begin failures++; $display("FAIL 8: key %0d = %h", k, root8); end
      // a cycle without EN changes nothing
      if (k == 4) begin en8 = 0; @(posedge clk); #1; en8 = 1;
        checks++; if (root8 !== {1'b1, 16'(exp8[k])}) failures++; end
      @(posedge clk); #1;
    end
    checks++; if (root8[16] !== 0) begin failures++; $display("FAIL 8: valid after last key"); end
    en8 = 0;

    for (int run = 0; run < 4; run++) begin
      int keys [32];
      int sorted [$];
      sorted.delete();
      clr32 = 1; @(posedge clk); #1 clr32 = 0;
      for (int i = 0; i < 32; i++) begin
        keys[i] = (run == 3) ? (i % 4) : int'($urandom % 65536);  // run 3: many equal keys
        lv32[i] = {1'b1, 16'(keys[i])};
        sorted.push_back(keys[i]);
      end
      sorted.rsort();
      en32 = 1;
      for (int c = 1; c <= 5; c++) begin
        @(posedge clk); #1;
        checks++;
        if (root32[16] !== (c == 5)) begin failures++; $display("FAIL 32: valid %b after %0d", root32[16], c); end
      end
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (root32 !== {1'b1, 16'(sorted[k])}) begin failures++; $display("FAIL 32 run %0d: key %0d = %h exp %h", run, k, root32, sorted[k]); end
        @(posedge clk); #1;
      end
      checks++; if (root32[16] !== 0) begin failures++; $display("FAIL 32: valid after last key"); end
      en32 = 0;
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
