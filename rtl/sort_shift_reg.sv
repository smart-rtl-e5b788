// sort_shift_reg: key shift register feeding the leaves of the sorting tree.
//
// N stages of {valid, key}. A write (WE) shifts every stage one place towards
// stage 0 and puts the new key, marked valid, in the tail stage N-1, so N
// writes fill the register. inval[i] (the Write of the leaf element reading
// stage i) clears that stage's valid bit at the clock edge; Clear clears all
// valid bits. This is the behaviour the document describes; the shift
// direction and the synchronous Clear are this design's choices.
module sort_shift_reg #(
  parameter int unsigned N     = 32,
  parameter int unsigned KEY_W = 16
) (
  input  logic             clk,
  input  logic             we,
  input  logic             clear,
  input  logic [KEY_W-1:0] din,
  input  logic [N-1:0]     inval,
  output logic [KEY_W:0]   q [N]
);
  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < N; i++) q[i][KEY_W] <= 1'b0;
    end else if (we) begin
      for (int i = 0; i < N - 1; i++) q[i] <= {q[i+1][KEY_W] && !inval[i+1], q[i+1][KEY_W-1:0]};
      q[N-1] <= {1'b1, din};
    end else begin
      for (int i = 0; i < N; i++) if (inval[i]) q[i][KEY_W] <= 1'b0;
    end
  end
endmodule
