// smart_imem: instruction memory of SMaRT.
//
// WORDS x 16-bit read-only memory with an asynchronous read, addressed by the
// low PC bits (8 bits for the default 256 words, the width the datapath
// drawing gives the PC-to-memory bus). It is initialised with the sorting
// example program from smart_pkg; the remaining words hold 0x0000, which is
// "add R0, R0" and harmless. How the program is loaded on the board is not
// described; a simulation may overwrite mem[] before the program runs.
module smart_imem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic [AW-1:0] addr,
  output logic [15:0]   instr
);
  logic [15:0] mem [WORDS];

  initial begin
    for (int unsigned i = 0; i < WORDS; i++) mem[i] = smart_pkg::example_program(i);
  end

  assign instr = mem[addr];
endmodule
