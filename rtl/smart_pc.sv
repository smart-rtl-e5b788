// smart_pc: program counter of SMaRT with its next-address logic.
//
// PCplus1 = PC + 1 comes from the incrementer; the branch adder forms
// PCforBranch = PCplus1 + BOffset. SuccessfulB picks the branch target over
// PCplus1, and rtn picks Rdata1 (R1) over both, giving NextPC. The PC loads
// NextPC at the rising edge when ENpc (en) is high; PCreset (rst) clears it,
// the reset value 0 being this design's choice. BOffset is the sign-extended
// 7-bit short offset or, in the second cycle of a long branch, the 16-bit
// offset word, so both branch kinds add their offset to the address that
// follows the word holding it, as the document specifies.
module smart_pc #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             successful_b,
  input  logic             rtn,
  input  logic [WIDTH-1:0] boffset,
  input  logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] pc,
  output logic [WIDTH-1:0] pc_plus1
);
  logic [WIDTH-1:0] pc_for_branch, next_pc;

  assign pc_plus1      = pc + WIDTH'(1);
  assign pc_for_branch = pc_plus1 + boffset;
  assign next_pc       = rtn ? rdata1 : (successful_b ? pc_for_branch : pc_plus1);

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= next_pc;
  end
endmodule
