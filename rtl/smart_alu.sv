// smart_alu: the 16-bit arithmetic/logic unit of SMaRT.
//
// Operand m is ALUm (Rs, or the PC during the offset word of a long branch),
// operand n is ALUn (Rd, a sign-extended constant or the constant 1). The
// seven operations are the document's: add, sub, and, or, nand, nor and slt.
// Subtraction and set-less-than follow the document's operand order, y = m - n
// and y = (m < n), where m is Rs and n is Rd. slt compares signed numbers,
// which is this design's choice. The eq output (m == n) is the branch
// comparison for beq/bne; the document does not say how that comparison is
// formed. Purely combinational.
module smart_alu
  import smart_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] m,
  input  logic [WIDTH-1:0] n,
  output logic [WIDTH-1:0] y,
  output logic             eq
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = m + n;
      ALU_SUB:  y = m - n;
      ALU_AND:  y = m & n;
      ALU_OR:   y = m | n;
      ALU_NAND: y = ~(m & n);
      ALU_NOR:  y = ~(m | n);
      ALU_SLT:  y = WIDTH'($signed(m) < $signed(n));
      default:  y = m + n;
    endcase
  end

  assign eq = (m == n);
endmodule
