// tb_sort_shift_reg: 32 writes fill the register in order, the tail is
// marked valid, per-stage invalidation and Clear, against a model.
module tb_sort_shift_reg;
  localparam int N = 32;
  logic clk = 0, we = 0, clear = 1;
  logic [15:0] din = 0;
  logic [N-1:0] inval = 0;
  logic [16:0] q [N];
  logic [16:0] model [N];
  int checks = 0, failures = 0;

  sort_shift_reg #(.N(N), .KEY_W(16)) dut (.clk(clk), .we(we), .clear(clear), .din(din), .inval(inval), .q(q));
  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i][16] !== model[i][16] || (model[i][16] && q[i][15:0] !== model[i][15:0])) begin
        failures++; $display("FAIL %s stage %0d %h exp %h", what, i, q[i], model[i]);
      end
    end
  endtask

  initial begin
    @(posedge clk); #1 clear = 0;
    foreach (model[i]) model[i] = '0;
    compare("clear");
    for (int k = 0; k < N; k++) begin
      we = 1; din = 16'(1000 + k);
      @(posedge clk); #1;
      for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
      model[N-1] = {1'b1, din};
    end
    we = 0;
    compare("fill");
    // the first key written is now at stage 0
    checks++; if (q[0] !== {1'b1, 16'd1000}) begin failures++; $display("FAIL order"); end
    for (int t = 0; t < 200; t++) begin
      we = ($urandom % 3) == 0; din = 16'($urandom);
      inval = we ? '0 : N'({$urandom, $urandom});
      clear = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (clear) foreach (model[i]) model[i][16] = 0;
      else if (we) begin
        for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
        model[N-1] = {1'b1, din};
      end else foreach (model[i]) if (inval[i]) model[i][16] = 0;
      clear = 0;
      compare("random");
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
