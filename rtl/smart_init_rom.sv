// smart_init_rom: the 128-word data ROM copied into the data memory in Init
// mode.
//
// Asynchronous-read ROM addressed by the 7 LSBs of the mode-controller state
// (InitAdrs). Its default contents are the data of the sorting example:
// word 0 = 0x8000 (address of the sorter's reset/status port), word 1 = 32
// (number of keys), word 2 = 42 (where the sorted keys go) and words 10..41
// the 32 keys. The document gives the key values only in sorted order; the
// unsorted order used here is this design's own.
module smart_init_rom #(
  parameter int unsigned WORDS = 128,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic [AW-1:0] addr,
  output logic [15:0]   data
);
  logic [15:0] rom [WORDS];

  initial begin
    for (int unsigned i = 0; i < WORDS; i++) rom[i] = smart_pkg::example_data(i);
  end

  assign data = rom[addr];
endmodule
