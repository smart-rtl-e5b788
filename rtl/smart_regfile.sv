// smart_regfile: the 16 x 16-bit orthogonal register file of SMaRT.
//
// Two asynchronous read ports (A1 -> Rdata1 for Rs, A2 -> Rdata2 for Rd) and
// one write port (A3, D3) written at the rising clock edge when WE is high,
// as a single-cycle processor needs. Every register, R0 included, is a
// general-purpose register; R1 also serves as the link register of the long
// branches. Clearing all registers on reset is this design's choice.
module smart_regfile #(
  parameter int unsigned N_REGS = 16,
  parameter int unsigned WIDTH  = 16,
  localparam int unsigned AW    = $clog2(N_REGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    a1,
  input  logic [AW-1:0]    a2,
  input  logic [AW-1:0]    a3,
  input  logic [WIDTH-1:0] d3,
  output logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] rdata2
);
  logic [WIDTH-1:0] regs [N_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[a3] <= d3;
    end
  end

  assign rdata1 = regs[a1];
  assign rdata2 = regs[a2];
endmodule
