// smart_control: control unit of SMaRT.
//
// Decodes the OpCode (bits 14:12), the Function field and cdr bit of R-type
// words, and the short-branch offset of B-type words into the control bundle
// ctrl_t and the SuccessfulB signal. B-type words with offset 0 are the
// special instructions sff (beq form) and rtn (bne form); offset -1 marks the
// first word of a long branch (baleq / balne).
//
// Long branches take two cycles. The first word sets the memory cell
// balPrevious; in the next cycle the fetched word is treated as the 16-bit
// offset: the ALU forms PC+1 (the return address), R1 is written with it and
// the PC loads PC+1+offset if the branch is taken, otherwise the PC simply
// steps over the offset word. The document has the cell and this behaviour;
// keeping the branch condition, evaluated on the first word while its register
// fields are present, in a second flip-flop (bal_cond) is this design's choice.
// The cells load only when en is high and clear on reset.
//
// The opcode values follow the machine code of the document's example; the
// function codes other than sub (1000) are this design's choice, and unused
// opcodes 110/111 write nothing.
module smart_control
  import smart_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] instr,
  input  logic        eq,            // Rs == Rd
  output ctrl_t       ctrl,
  output logic        successful_b
);
  logic    bal_prev, bal_cond;
  logic    bal_start, cond;
  opcode_e opc;
  logic [15:0] boff;

  assign opc  = opcode_e'(instr[14:12]);
  assign boff = b_offset(instr);
  // beq tests equality, bne inequality
  assign cond = (opc == OP_BEQ) ? eq : !eq;

  always_comb begin
    ctrl           = '0;
    ctrl.alu_src_n = SRCN_RD2;
    ctrl.alu_op    = ALU_ADD;
    bal_start      = 1'b0;
    successful_b   = 1'b0;
    if (bal_prev) begin
      // this word is the offset of a long branch
      ctrl.bal_previous = 1'b1;
      ctrl.boffset_long = 1'b1;
      ctrl.alu_m_pc     = 1'b1;
      ctrl.alu_src_n    = SRCN_ONE;
      ctrl.force_r1_wr  = 1'b1;
      ctrl.alu_to_reg   = 1'b1;
      ctrl.we_rf        = bal_cond;
      successful_b      = bal_cond;
    end else begin
      unique case (opc)
        OP_R: begin
          ctrl.is_rl      = 1'b1;
          ctrl.cdr        = instr[15];
          ctrl.we_rf      = 1'b1;
          ctrl.alu_to_reg = 1'b1;
          case (instr[3:0])
            FN_ADD:  ctrl.alu_op = ALU_ADD;
            FN_SUB:  ctrl.alu_op = ALU_SUB;
            FN_AND:  ctrl.alu_op = ALU_AND;
            FN_OR:   ctrl.alu_op = ALU_OR;
            FN_NAND: ctrl.alu_op = ALU_NAND;
            FN_NOR:  ctrl.alu_op = ALU_NOR;
            FN_SLT:  ctrl.alu_op = ALU_SLT;
            default: ctrl.alu_op = ALU_ADD;
          endcase
        end
        OP_ADDI: begin
          ctrl.is_rl      = 1'b1;
          ctrl.alu_src_n  = SRCN_IMM;
          ctrl.we_rf      = 1'b1;
          ctrl.alu_to_reg = 1'b1;
        end
        OP_LW: begin
          ctrl.is_rl     = 1'b1;
          ctrl.alu_src_n = SRCN_IMM;
          ctrl.we_rf     = 1'b1;
          ctrl.mem_read  = 1'b1;
        end
        OP_SW: begin
          ctrl.is_rl     = 1'b1;
          ctrl.alu_src_n = SRCN_IMM;
          ctrl.mem_write = 1'b1;
        end
        OP_BEQ, OP_BNE: begin
          ctrl.alu_op = ALU_SUB;
          if (boff == 16'h0000) begin
            if (opc == OP_BEQ) ctrl.is_sff = 1'b1;
            else               ctrl.rtn    = 1'b1;
          end else begin
            ctrl.is_branch = 1'b1;
            if (boff == 16'hFFFF) bal_start    = 1'b1;
            else                  successful_b = cond;
          end
        end
        default: ;  // unused opcodes: no operation
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bal_prev <= 1'b0;
      bal_cond <= 1'b0;
    end else if (en) begin
      bal_prev <= bal_start;
      bal_cond <= cond;
    end
  end
endmodule
