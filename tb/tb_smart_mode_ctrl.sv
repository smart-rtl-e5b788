// tb_smart_mode_ctrl: Init copy sweep, Step presses (one enabled cycle per
// press), Run, stop with GO, and the LEDs, against the mode graph.
module tb_smart_mode_ctrl;
  logic clk = 0, rst = 1, run_n = 1, go_n = 1, step_n = 1;
  logic [7:0] st;
  logic isel, en, li, lr, ls;
  logic [6:0] ia;
  int checks = 0, failures = 0, en_count = 0, sel_count = 0;
  bit seen_adr [128];

  smart_mode_ctrl dut (.clk(clk), .rst(rst), .run_n(run_n), .go_n(go_n), .step_n(step_n),
    .state(st), .init_sel(isel), .init_adrs(ia), .cpu_en(en), .led_init(li), .led_run(lr), .led_step(ls));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (en) en_count++;
    if (isel) begin sel_count++; seen_adr[ia] = 1; end
  end

  task automatic expect_state(logic [7:0] e);
    checks++;
    if (st !== e) begin failures++; $display("FAIL state %h exp %h at %0t", st, e, $time); end
  endtask
  task automatic cyc(int n); repeat (n) @(posedge clk); #1; endtask

  initial begin
    cyc(2); rst = 0; #1;
    expect_state(8'h7F); checks++; if (!li || lr || ls) failures++;
    // Init: press GO, the sweep 00..7E copies words 0..126, waits in 7E until release
    foreach (seen_adr[i]) seen_adr[i] = 0;
    sel_count = 0;
    go_n = 0; cyc(1); expect_state(8'h00);
    cyc(126); expect_state(8'h7E);
    cyc(5); expect_state(8'h7E);
    go_n = 1; cyc(1); expect_state(8'h7F);
    begin
      int all = 1;
      foreach (seen_adr[i]) if (seen_adr[i] != (i != 127)) all = 0;
      checks++; if (!all) begin failures++; $display("FAIL ROM words 0..126 not copied exactly"); end
    end
    checks++; if (en_count != 0) begin failures++; $display("FAIL cpu enabled in Init"); end
    // Step: three presses -> exactly three enabled cycles
    for (int k = 0; k < 3; k++) begin
      step_n = 0; cyc(4); expect_state(8'h80);
      step_n = 1; cyc(1); expect_state(8'h81); checks++; if (!en) failures++;
      cyc(1); expect_state(8'h82); checks++; if (!ls) failures++;
      cyc(3); expect_state(8'h82);
    end
    checks++; if (en_count != 3) begin failures++; $display("FAIL step count %0d", en_count); end
    // Run from Step mode
    run_n = 0; cyc(3); expect_state(8'h83);
    run_n = 1; cyc(1); expect_state(8'h84); checks++; if (!lr) failures++;
    en_count = 0; cyc(20); checks++; if (en_count != 20) begin failures++; $display("FAIL run count %0d", en_count); end
    run_n = 0; cyc(2); expect_state(8'h84);  // Run = x
    run_n = 1;
    // GO stops: 85 until release, then 7F
    go_n = 0; cyc(1); expect_state(8'h85); cyc(3); expect_state(8'h85);
    go_n = 1; cyc(1); expect_state(8'h7F);
    // Run directly from Init mode
    run_n = 0; cyc(1); expect_state(8'h83); run_n = 1; cyc(1); expect_state(8'h84);
    go_n = 0; cyc(1); go_n = 1; cyc(1); expect_state(8'h7F);
    // GO from Step mode stops too
    step_n = 0; cyc(1); step_n = 1; cyc(2); expect_state(8'h82);
    go_n = 0; cyc(1); expect_state(8'h85); go_n = 1; cyc(1); expect_state(8'h7F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
