// sort_coprocessor: the sorting coprocessor and its memory-mapped port.
//
// Holds an N-stage key shift register (sort_shift_reg) and an (N-1)-element
// sorting tree (sort_tree) and decodes the processor's I/O bus:
//   sw to 0x8001 (IOWE)  -> WE: the key on dBusO enters the tail of the
//                           shift register, marked valid;
//   sw to 0x8000 (IOWE)  -> Clear: every valid bit is cleared;
//   lw from 0x8001 (IORE)-> EN: one clock pulse for the tree pipeline, while
//                           the processor reads the root key;
//   lw from 0x8000       -> the status word, 15 zeros and the root's valid
//                           bit, without moving the tree.
// dBusI is selected by aBus(0) only: 1 gives the root key, 0 the status word.
// All of this follows the document; the full 16-bit address compare is this
// design's reading of the drawing. Reads are combinational, the effects of
// writes and of EN take place at the clock edge of the access.
module sort_coprocessor #(
  parameter int unsigned N_KEYS = 32,
  parameter int unsigned KEY_W  = 16
) (
  input  logic             clk,
  input  logic [15:0]      a_bus,
  input  logic [KEY_W-1:0] d_bus_o,
  input  logic             io_we,
  input  logic             io_re,
  output logic [KEY_W-1:0] d_bus_i
);
  localparam logic [15:0] ADR_RESET = 16'h8000;
  localparam logic [15:0] ADR_DATA  = 16'h8001;

  logic           we, clear, en;
  logic [KEY_W:0] stages [N_KEYS];
  logic [N_KEYS-1:0] leaf_write;
  logic [KEY_W:0] key_out;

  assign we    = io_we && (a_bus == ADR_DATA);
  assign clear = io_we && (a_bus == ADR_RESET);
  assign en    = io_re && (a_bus == ADR_DATA);

  sort_shift_reg #(.N(N_KEYS), .KEY_W(KEY_W)) u_shreg (
    .clk(clk), .we(we), .clear(clear), .din(d_bus_o), .inval(leaf_write), .q(stages)
  );

  sort_tree #(.N(N_KEYS), .KEY_W(KEY_W)) u_tree (
    .clk(clk), .en(en), .clear(clear), .leaves(stages), .leaf_write(leaf_write), .key_out(key_out)
  );

  assign d_bus_i = a_bus[0] ? key_out[KEY_W-1:0] : KEY_W'(key_out[KEY_W]);
endmodule
