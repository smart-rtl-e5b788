// smart_pkg: types and constants shared by the SMaRT processor and its
// sorting coprocessor.
//
// Instruction word (16 bits). OpCode is always bits 14:12.
//   R-type   : cdr[15] | 000 | Rs[11:8] | Rd[7:4] | Function[3:0]
//   LSI-type : c4[15]  | op  | Rs[11:8] | Rd[7:4] | c3..c0[3:0]   constant = {c4, c3..c0}
//   B-type   : o6[15]  | op  | o5[11] Rs[10:8] | o4[7] Rd[6:4] | o3..o0[3:0]
//              offset = {o6, o5, o4, o3..o0}; the hidden Rs/Rd MSBs come
//              from the msbRs/msbRd flip-flops.
//   BL-type  : B-type with offset -1, followed by a 16-bit offset word.
// The OpCode values are those of the machine code listed with the sorting
// example program (lw 100, sw 101, addi 001, beq 010, bne 011, R-type 000).
// Only the sub function code (1000) is fixed by that listing; the other
// function codes are this design's choice. Offset 0 turns beq into sff and
// bne into rtn; offset -1 turns them into baleq and balne.
//
// The package also holds the default contents of the instruction memory
// (the sorting example program) and of the Init data ROM.
package smart_pkg;

  typedef enum logic [2:0] {
    OP_R    = 3'b000,
    OP_ADDI = 3'b001,
    OP_BEQ  = 3'b010,
    OP_BNE  = 3'b011,
    OP_LW   = 3'b100,
    OP_SW   = 3'b101,
    OP_U6   = 3'b110,   // unused, executes as no-operation
    OP_U7   = 3'b111    // unused, executes as no-operation
  } opcode_e;

  typedef enum logic [3:0] {
    FN_ADD  = 4'b0000,
    FN_AND  = 4'b0001,
    FN_OR   = 4'b0010,
    FN_SUB  = 4'b1000,
    FN_NAND = 4'b1001,
    FN_NOR  = 4'b1010,
    FN_SLT  = 4'b1011
  } funct_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NAND, ALU_NOR, ALU_SLT
  } alu_op_e;

  // ALUn operand select (Fig. "ALUsrcN"): Rdata2, constant 1, sign-extended constant
  typedef enum logic [1:0] {
    SRCN_RD2 = 2'b00,
    SRCN_IMM = 2'b01,
    SRCN_ONE = 2'b10
  } srcn_e;

  // Control signals produced by the control unit for one cycle.
  typedef struct packed {
    logic      is_rl;        // R- or LSI-type: updates the msb flip-flops
    logic      is_branch;    // B- or BL-type first word: register MSBs from the flip-flops
    logic      is_sff;       // set msb FFs
    logic      cdr;          // 2.5-address R-type: write to Rd+1
    logic      rtn;          // return: PC <= R1
    logic      bal_previous; // this word is the offset of a long branch
    logic      force_r1_wr;  // write address R1 (long-branch link)
    logic      alu_m_pc;     // ALUm = PC instead of Rdata1
    srcn_e     alu_src_n;
    alu_op_e   alu_op;
    logic      we_rf;        // WEforRF
    logic      mem_read;     // lw
    logic      mem_write;    // sw
    logic      alu_to_reg;   // write-back takes ALUout
    logic      boffset_long; // BOffset = instruction word (long branch)
  } ctrl_t;

  // Sign-extended short-branch offset of a B-type word.
  function automatic logic [15:0] b_offset(input logic [15:0] i);
    return {{9{i[15]}}, i[15], i[11], i[7], i[3:0]};
  endfunction

  // Sign-extended 5-bit constant of an LSI-type word.
  function automatic logic [15:0] lsi_const(input logic [15:0] i);
    return {{11{i[15]}}, i[15], i[3:0]};
  endfunction

  // Default instruction memory: the sorting example (32 keys from data
  // words 10..41 to the coprocessor, sorted keys back to words 42..73).
  function automatic logic [15:0] example_program(input int unsigned a);
    case (a)
      0:  return 16'h0008;  // sub  R0, R0          R0 <= 0
      1:  return 16'h4020;  // lw   R2, 0(R0)       port reset address 0x8000
      2:  return 16'h1211;  // addi R1, R2, 1       port data address 0x8001
      3:  return 16'h5220;  // sw   R2, 0(R2)       clear the sorter
      4:  return 16'h4071;  // lw   R7, 1(R0)       number of keys
      5:  return 16'h977F;  // addi R7, R7, -1
      6:  return 16'h476A;  // lw   R6, 10(R7)      next key
      7:  return 16'h5160;  // sw   R6, 0(R1)       push it into the sorter
      8:  return 16'hBF8C;  // bne  R7, R0, 5
      9:  return 16'h4160;  // lw   R6, 0(R1)       clock the sorter
      10: return 16'h4260;  // lw   R6, 0(R2)       status (valid bit)
      11: return 16'hAE8D;  // beq  R6, R0, 9
      12: return 16'h4072;  // lw   R7, 2(R0)       output pointer
      13: return 16'h4160;  // lw   R6, 0(R1)       sorted key
      14: return 16'h5760;  // sw   R6, 0(R7)
      15: return 16'h1771;  // addi R7, R7, 1
      16: return 16'h4260;  // lw   R6, 0(R2)       status
      17: return 16'hBE8B;  // bne  R6, R0, 13
      18: return 16'hA88E;  // beq  R0, R0, 17      idle loop (17 <-> 18)
      default: return 16'h0000;
    endcase
  endfunction

  // The 32 keys of the example, listed in an arbitrary (unsorted) order.
  function automatic logic [15:0] example_key(input int unsigned k);
    case (k)
      0:  return 16'h0422;  1:  return 16'h0018;  2:  return 16'h7027;  3:  return 16'h0102;
      4:  return 16'h0029;  5:  return 16'h2006;  6:  return 16'h0009;  7:  return 16'h0443;
      8:  return 16'h0621;  9:  return 16'h0023;  10: return 16'h4005;  11: return 16'h0314;
      12: return 16'h0064;  13: return 16'h0011;  14: return 16'h0576;  15: return 16'h3025;
      16: return 16'h0024;  17: return 16'h0812;  18: return 16'h0203;  19: return 16'h0031;
      20: return 16'h0428;  21: return 16'h0014;  22: return 16'h6007;  23: return 16'h0126;
      24: return 16'h0019;  25: return 16'h0517;  26: return 16'h0430;  27: return 16'h2001;
      28: return 16'h0028;  29: return 16'h0732;  30: return 16'h0415;  31: return 16'h0020;
      default: return 16'h0000;
    endcase
  endfunction

  // Default Init data ROM: word 0 = port reset address, word 1 = key count,
  // word 2 = output pointer, words 10..41 = keys, all else 0.
  function automatic logic [15:0] example_data(input int unsigned a);
    if (a == 0) return 16'h8000;
    if (a == 1) return 16'd32;
    if (a == 2) return 16'd42;
    if (a >= 10 && a <= 41) return example_key(a - 10);
    return 16'h0000;
  endfunction

endpackage
