// smart_reg_decoder: register-address decoder of SMaRT, with the msbRs/msbRd
// flip-flops and the 3-bit destination incrementor.
//
// Read address 1 (Rs) and read address 2 (Rd) come from instruction bits
// 11:8 and 7:4. In a branch (B- or BL-type) the MSB of each field is not in
// the instruction: it is taken from the msbRs / msbRd flip-flops, which every
// R- and LSI-type instruction loads with its own bits 11 and 7, and which the
// sff instruction loads with its bits 10 and 9. This lets a branch reach the
// register-file half the preceding instruction used, and frees three bits for
// a 7-bit offset. For a 2.5-address R-type instruction (cdr = 1) the write
// address is Rd with its three LSBs incremented (wrapping: 0111 -> 0000,
// 1111 -> 1000); the incrementor works in parallel with the register read and
// ALU and is off the critical path. All of this follows the document.
// rtn reads R1 on port 1 and the long-branch link writes R1; forcing the
// address here, whatever the fields hold, is this design's choice.
// The flip-flops are cleared on reset (a choice) and load only when en is high.
module smart_reg_decoder (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] instr,
  input  logic        is_rl,
  input  logic        is_sff,
  input  logic        is_branch,
  input  logic        cdr,
  input  logic        force_r1_rd,
  input  logic        force_r1_wr,
  output logic [3:0]  radrs1,
  output logic [3:0]  radrs2,
  output logic [3:0]  wadrs,
  output logic        msb_rs,
  output logic        msb_rd
);
  logic rs_msb, rd_msb;

  always_ff @(posedge clk) begin
    if (rst) begin
      msb_rs <= 1'b0;
      msb_rd <= 1'b0;
    end else if (en) begin
      if (is_rl) begin
        msb_rs <= instr[11];
        msb_rd <= instr[7];
      end else if (is_sff) begin
        msb_rs <= instr[10];
        msb_rd <= instr[9];
      end
    end
  end

  assign rs_msb = is_branch ? msb_rs : instr[11];
  assign rd_msb = is_branch ? msb_rd : instr[7];

  assign radrs1 = force_r1_rd ? 4'd1 : {rs_msb, instr[10:8]};
  assign radrs2 = {rd_msb, instr[6:4]};

  always_comb begin
    if (force_r1_wr)  wadrs = 4'd1;
    else if (cdr)     wadrs = {rd_msb, instr[6:4] + 3'd1};
    else              wadrs = radrs2;
  end
endmodule
