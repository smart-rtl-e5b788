// sorter2: sorting element of the pipelined sorting tree.
//
// Inputs and output are 17-bit words {valid, key}. The element holds one
// output word. In a cycle where EN is high and its output is empty or is
// being taken by its parent (Read), it reads the inputs it has: with two
// valid inputs it takes the larger key, with one it takes that one, with
// none its output becomes empty. It raises Write0 or Write1 in the same cycle
// so that the input it took is marked invalid at the clock edge. Clear
// empties the output. This is the behaviour the document describes; equal
// keys taking input 0, unsigned comparison and a synchronous Clear that wins
// over EN are this design's choices. Write0/Write1 are combinational, the
// output is registered (one element = one pipeline stage).
module sorter2 #(
  parameter int unsigned KEY_W = 16
) (
  input  logic           clk,
  input  logic           en,
  input  logic           clear,
  input  logic [KEY_W:0] key_in0,
  input  logic [KEY_W:0] key_in1,
  input  logic           read,
  output logic           write0,
  output logic           write1,
  output logic [KEY_W:0] key_out
);
  logic v0, v1, take, pick0, pick1;

  assign v0    = key_in0[KEY_W];
  assign v1    = key_in1[KEY_W];
  assign take  = en && !clear && (!key_out[KEY_W] || read);
  assign pick0 = v0 && (!v1 || key_in0[KEY_W-1:0] >= key_in1[KEY_W-1:0]);
  assign pick1 = v1 && !pick0;

  assign write0 = take && pick0;
  assign write1 = take && pick1;

  always_ff @(posedge clk) begin
    if (clear)         key_out[KEY_W] <= 1'b0;
    else if (take) begin
      if (pick0)       key_out <= key_in0;
      else if (pick1)  key_out <= key_in1;
      else             key_out[KEY_W] <= 1'b0;
    end
  end
endmodule
