// sort_tree: pipelined binary sorting tree of N-1 sorter2 elements.
//
// The tree has log2(N) levels; level 0 is the root, level l holds 2^l
// elements, and the elements of the last level read pairs of shift-register
// stages (the leaves). Every element is one pipeline stage, all clocked by the
// same EN. The root's Read is tied to 1, so each EN pulse takes the root's
// word and moves every emptied element up by one key. Starting from N valid
// leaves, the largest key reaches the root after log2(N) EN pulses and the
// other keys follow in descending order, one per pulse; after the last key
// the root's valid bit drops. leaf_write[i] is the Write from the element
// that reads stage i. This structure and timing follow the document
// (31 elements for 32 keys). N must be a power of two, at least 2.
module sort_tree #(
  parameter int unsigned N     = 32,
  parameter int unsigned KEY_W = 16,
  localparam int unsigned DEPTH = $clog2(N)
) (
  input  logic           clk,
  input  logic           en,
  input  logic           clear,
  input  logic [KEY_W:0] leaves [N],
  output logic [N-1:0]   leaf_write,
  output logic [KEY_W:0] key_out
);
  for (genvar l = 0; l < DEPTH; l++) begin : lvl
    localparam int unsigned M = 2 ** l;
    logic [KEY_W:0] kout [M];
    logic           rd   [M];
    logic           wr0  [M];
    logic           wr1  [M];

    for (genvar k = 0; k < M; k++) begin : node
      logic [KEY_W:0] in0, in1;
      if (l == DEPTH - 1) begin : g_leaf
        assign in0 = leaves[2*k];
        assign in1 = leaves[2*k+1];
        assign leaf_write[2*k]   = wr0[k];
        assign leaf_write[2*k+1] = wr1[k];
      end else begin : g_inner
        assign in0 = lvl[l+1].kout[2*k];
        assign in1 = lvl[l+1].kout[2*k+1];
      end
      if (l == 0) begin : g_root
        assign rd[k] = 1'b1;
      end else if (k % 2 == 0) begin : g_left
        assign rd[k] = lvl[l-1].wr0[k/2];
      end else begin : g_right
        assign rd[k] = lvl[l-1].wr1[k/2];
      end

      sorter2 #(.KEY_W(KEY_W)) u_el (
        .clk(clk), .en(en), .clear(clear), .key_in0(in0), .key_in1(in1),
        .read(rd[k]), .write0(wr0[k]), .write1(wr1[k]), .key_out(kout[k])
      );
    end
  end

  assign key_out = lvl[0].kout[0];

  initial begin
    assert (N >= 2 && (1 << DEPTH) == N) else $error("sort_tree: N must be a power of two");
  end
endmodule
