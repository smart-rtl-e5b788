// tb_smart_alu: random and corner operands for all seven ALU operations,
// checked against expressions written out here.
module tb_smart_alu;
  import smart_pkg::*;
  alu_op_e op;
  logic [15:0] m, n, y;
  logic eq;
  int checks = 0, failures = 0;

  smart_alu dut (.op(op), .m(m), .n(n), .y(y), .eq(eq));

  function automatic logic [15:0] ref_y(alu_op_e o, logic [15:0] a, logic [15:0] b);
    int sa, sb;
    sa = int'($signed(a)); sb = int'($signed(b));
    case (o)
      ALU_ADD:  return 16'((int'(a) + int'(b)) & 32'hFFFF);
      ALU_SUB:  return 16'((int'(a) - int'(b)) & 32'hFFFF);
      ALU_AND:  return a & b;
      ALU_OR:   return a | b;
      ALU_NAND: return ~(a & b);
      ALU_NOR:  return ~(a | b);
      ALU_SLT:  return (sa < sb) ? 16'd1 : 16'd0;
      default:  return 16'hxxxx;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [15:0] a, logic [15:0] b);
    op = o; m = a; n = b;
    #1;
    checks++;
    if (y !== ref_y(o, a, b) || eq !== (a == b)) begin
      failures++;
      $display("FAIL op=%s m=%h n=%h y=%h exp=%h eq=%b", o.name(), a, b, y, ref_y(o, a, b), eq);
    end
  endtask

  initial begin
    alu_op_e ops [7] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NAND, ALU_NOR, ALU_SLT};
    // document example: sub R3, R6 -> R3 = R6 - R3 (m = Rs = R6, n = Rd = R3)
    check(ALU_SUB, 16'd10, 16'd3);
    check(ALU_SLT, 16'hFFFF, 16'h0001);  // -1 < 1
    check(ALU_SLT, 16'h0001, 16'hFFFF);
    check(ALU_SLT, 16'h7FFF, 16'h8000);
    check(ALU_SLT, 16'h0005, 16'h0005);
    for (int i = 0; i < 2000; i++)
      check(ops[i % 7], 16'($urandom), (i % 5 == 0) ? m : 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
