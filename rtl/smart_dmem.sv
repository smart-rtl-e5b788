// smart_dmem: data memory of SMaRT.
//
// WORDS x 16-bit memory (128 words, 7-bit address) with an asynchronous read,
// so that lw completes in one cycle, and a synchronous write. It has two write
// enables as drawn in the datapath: WE1 for stores by the processor and WE2
// for the Init-mode copy of the data ROM; the multiplexing of address and
// data between those sources is done outside. The contents are not reset.
module smart_dmem #(
  parameter int unsigned WORDS = 128,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we1,
  input  logic          we2,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);
  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we1 || we2) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
