// tb_smart_asm: instruction encoders used by the SMaRT testbenches.
// Field layout: R-type {cdr, 000, Rs, Rd, Function}; LSI-type {c4, op, Rs,
// Rd, c3..c0}; B-type {o6, op, o5, Rs[2:0], o4, Rd[2:0], o3..o0}.
package tb_smart_asm;
  localparam logic [2:0] R = 3'b000, ADDI = 3'b001, BEQ = 3'b010, BNE = 3'b011,
                         LW = 3'b100, SW = 3'b101;
  localparam logic [3:0] F_ADD = 4'h0, F_AND = 4'h1, F_OR = 4'h2, F_SUB = 4'h8,
                         F_NAND = 4'h9, F_NOR = 4'hA, F_SLT = 4'hB;

  function automatic logic [15:0] rtype(logic [3:0] fn, logic [3:0] rd, logic [3:0] rs, logic cdr);
    return {cdr, R, rs, rd, fn};
  endfunction
  function automatic logic [15:0] lsi(logic [2:0] op, logic [3:0] rd, logic [3:0] rs, int c);
    logic [4:0] k;
    k = 5'(c);
    return {k[4], op, rs, rd, k[3:0]};
  endfunction
  function automatic logic [15:0] btype(logic [2:0] op, logic [2:0] rs, logic [2:0] rd, int off);
    logic [6:0] o;
    o = 7'(off);
    return {o[6], op, o[5], rs, o[4], rd, o[3:0]};
  endfunction
  function automatic logic [15:0] sff(logic ms, logic md);
    return {1'b0, BEQ, 1'b0, ms, md, 1'b0, 1'b0, 3'b000, 4'b0000};
  endfunction
  function automatic logic [15:0] rtn();
    return btype(BNE, 3'd0, 3'd0, 0);
  endfunction
endpackage
