// tb_sorter2: the sorting element's choice of input, its Write outputs, its
// hold when full and not read, EN gating and Clear.
module tb_sorter2;
  logic clk = 0, en = 0, clear = 1, read = 0;
  logic [16:0] in0 = 0, in1 = 0, out;
  logic w0, w1;
  int checks = 0, failures = 0;

  sorter2 dut (.clk(clk), .en(en), .clear(clear), .key_in0(in0), .key_in1(in1), .read(read),
               .write0(w0), .write1(w1), .key_out(out));
  always #5 clk = ~clk;

  // drive inputs, check the Write outputs, clock, check the output word
  task automatic cycle(logic e, logic r, logic [16:0] a, logic [16:0] b,
                       logic ew0, logic ew1, logic ev, logic [15:0] ek);
    en = e; read = r; in0 = a; in1 = b; #1;
    checks++;
    if (w0 !== ew0 || w1 !== ew1) begin failures++; $display("FAIL write %b%b exp %b%b", w0, w1, ew0, ew1); end
    @(posedge clk); #1;
    checks++;
    if (out[16] !== ev || (ev && out[15:0] !== ek)) begin
      failures++; $display("FAIL out %h exp %b/%h", out, ev, ek);
    end
  endtask

  initial begin
    @(posedge clk); #1 clear = 0;
    checks++; if (out[16] !== 0) failures++;
    cycle(1, 0, {1'b0, 16'd5}, {1'b0, 16'd9}, 0, 0, 0, 0);          // no valid input: idle
    cycle(1, 0, {1'b1, 16'd5}, {1'b1, 16'd9}, 0, 1, 1, 16'd9);      // takes the larger
    cycle(1, 0, {1'b1, 16'd7}, {1'b1, 16'd2}, 0, 0, 1, 16'd9);      // full, not read: holds
    cycle(1, 1, {1'b1, 16'd7}, {1'b1, 16'd2}, 1, 0, 1, 16'd7);      // read: refills
    cycle(1, 1, {1'b0, 16'd7}, {1'b1, 16'd2}, 0, 1, 1, 16'd2);      // only one valid
    cycle(1, 1, {1'b1, 16'hFFFF}, {1'b1, 16'h8000}, 1, 0, 1, 16'hFFFF); // unsigned compare
    cycle(0, 1, {1'b1, 16'd1}, {1'b1, 16'd3}, 0, 0, 1, 16'hFFFF);   // EN low: nothing moves
    cycle(1, 1, {1'b0, 16'd1}, {1'b0, 16'd3}, 0, 0, 0, 0);          // read with nothing left: empty
    cycle(1, 0, {1'b1, 16'd4}, {1'b1, 16'd4}, 1, 0, 1, 16'd4);      // tie takes input 0
    clear = 1; cycle(1, 0, {1'b1, 16'd8}, {1'b1, 16'd4}, 0, 0, 0, 0); clear = 0;
    for (int i = 0; i < 300; i++) begin
      logic [16:0] a, b; logic full, r, e, t, p0, p1;
      logic [15:0] prev;
      a = 17'($urandom); b = 17'($urandom); r = $urandom % 2; e = ($urandom % 4) != 0;
      full = out[16]; prev = out[15:0];
      t = e && (!full || r);
      p0 = a[16] && (!b[16] || a[15:0] >= b[15:0]);
      p1 = b[16] && !p0;
      cycle(e, r, a, b, t && p0, t && p1, t ? (p0 || p1) : full,
            t ? (p0 ? a[15:0] : b[15:0]) : prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
