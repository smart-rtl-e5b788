// tb_smart_reg_decoder: address formation for R/LSI words, the 2.5-address
// incrementor with its wrap, the msb flip-flops carried into branches, sff,
// and the forced R1 addresses.
module tb_smart_reg_decoder;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] instr = 0;
  logic is_rl = 0, is_sff = 0, is_branch = 0, cdr = 0, f1r = 0, f1w = 0;
  logic [3:0] ra1, ra2, wa;
  logic mrs, mrd;
  int checks = 0, failures = 0;

  smart_reg_decoder dut (.clk(clk), .rst(rst), .en(en), .instr(instr), .is_rl(is_rl),
    .is_sff(is_sff), .is_branch(is_branch), .cdr(cdr), .force_r1_rd(f1r), .force_r1_wr(f1w),
    .radrs1(ra1), .radrs2(ra2), .wadrs(wa), .msb_rs(mrs), .msb_rd(mrd));
  always #5 clk = ~clk;

  task automatic expect4(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // apply one instruction for one enabled cycle, checking the addresses first
  task automatic apply(logic [15:0] i, logic rl, logic sf, logic br, logic c,
                       logic [3:0] e1, logic [3:0] e2, logic [3:0] ew);
    instr = i; is_rl = rl; is_sff = sf; is_branch = br; cdr = c; en = 1; #1;
    expect4("radrs1", ra1, e1); expect4("radrs2", ra2, e2); expect4("wadrs", wa, ew);
    @(posedge clk); #1; en = 0;
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    checks++; if (mrs !== 0 || mrd !== 0) failures++;
    // add+R2, R5 : Rs = R5, Rd = R2, writes R3
    apply({1'b1, 3'b000, 4'd5, 4'd2, 4'h0}, 1, 0, 0, 1, 4'd5, 4'd2, 4'd3);
    // Rd 0111 with cdr -> 0000 ; Rd 1111 -> 1000
    apply({1'b1, 3'b000, 4'd9, 4'd7, 4'h8}, 1, 0, 0, 1, 4'd9, 4'd7, 4'd0);
    apply({1'b1, 3'b000, 4'd1, 4'd15, 4'h8}, 1, 0, 0, 1, 4'd1, 4'd15, 4'd8);
    // that R-type left msbRs = 0, msbRd = 1
    checks++; if (mrs !== 0 || mrd !== 1) begin failures++; $display("FAIL msb after R"); end
    // branch: fields 3 bits, MSBs from the flip-flops
    apply({1'b1, 3'b010, 1'b1, 3'd6, 1'b1, 3'd2, 4'hD}, 0, 0, 1, 0, 4'd6, 4'd10, 4'd10);
    // flip-flops unchanged by the branch
    checks++; if (mrs !== 0 || mrd !== 1) begin failures++; $display("FAIL msb after branch"); end
    // LSI lw R12, 3(R9): msbRs = 1, msbRd = 1
    apply({1'b0, 3'b100, 4'd9, 4'd12, 4'h3}, 1, 0, 0, 0, 4'd9, 4'd12, 4'd12);
    checks++; if (mrs !== 1 || mrd !== 1) begin failures++; $display("FAIL msb after LSI"); end
    apply({1'b0, 3'b011, 1'b0, 3'd3, 1'b0, 3'd4, 4'h5}, 0, 0, 1, 0, 4'd11, 4'd12, 4'd12);
    // sff with bit10 = 0, bit9 = 1
    apply({1'b0, 3'b010, 1'b0, 3'b010, 1'b0, 3'b000, 4'h0}, 0, 1, 0, 0, 4'd2, 4'd0, 4'd0);
    checks++; if (mrs !== 0 || mrd !== 1) begin failures++; $display("FAIL msb after sff"); end
    apply({1'b0, 3'b010, 1'b0, 3'd3, 1'b0, 3'd4, 4'h5}, 0, 0, 1, 0, 4'd3, 4'd12, 4'd12);
    // disabled cycle does not load the flip-flops
    instr = {1'b0, 3'b100, 4'd9, 4'd3, 4'h3}; is_rl = 1; en = 0; @(posedge clk); #1;
    checks++; if (mrs !== 0 || mrd !== 1) begin failures++; $display("FAIL msb loaded while disabled"); end
    // forced R1
    f1r = 1; f1w = 1; instr = 16'hBF8C; is_rl = 0; #1;
    expect4("rtn radrs1", ra1, 4'd1); expect4("link wadrs", wa, 4'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
