// smart_mode_ctrl: operation-mode state machine of SMaRT (Init, Step, Run).
//
// Inputs are the levels of the three pushbuttons, 0 while pressed, assumed
// debounced. The 8-bit state is shown on LEDs and drives the datapath:
//   7F        Init mode, idle (reset state, a choice of this design).
//   00..7E    Init copy: GO pressed in 7F walks the states 00, 01, ... 7E;
//             in each of them InitSel is high and the data ROM word at the
//             7 state LSBs is written into the data memory. Word 127 is not
//             copied: making 7F a copy state too would rewrite that word, and
//             block Manual reads, for as long as the machine idles in Init
//             mode. 7E waits for GO to be released, then goes to 7F.
//   80,81,82  Step: a Step press goes to 80, which waits for the release;
//             81 gives the processor exactly one clock-enabled cycle; 82 is
//             the Step-mode rest state.
//   83,84     Run: a Run press goes to 83, which waits for the release;
//             84 enables the processor every cycle.
//   85        a GO press in Step or Run mode stops; 85 waits for the release
//             and returns to 7F.
// The arcs and their key conditions are those drawn in the mode-controller
// graph of the document; the arcs it leaves unlabelled (7F to 00 on GO,
// 82 to 80 on Step, 83 to 84 on release, staying in 7F/82 otherwise) and the
// priority Step > Run > GO are this design's reading. Manual mode is a
// data-memory address switch outside this controller.
module smart_mode_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       run_n,
  input  logic       go_n,
  input  logic       step_n,
  output logic [7:0] state,
  output logic       init_sel,
  output logic [6:0] init_adrs,
  output logic       cpu_en,
  output logic       led_init,
  output logic       led_run,
  output logic       led_step
);
  localparam logic [7:0] S_INIT     = 8'h7F;
  localparam logic [7:0] S_INIT_END = 8'h7E;
  localparam logic [7:0] S_STEP_DN  = 8'h80;
  localparam logic [7:0] S_STEP_CLK = 8'h81;
  localparam logic [7:0] S_STEP     = 8'h82;
  localparam logic [7:0] S_RUN_DN   = 8'h83;
  localparam logic [7:0] S_RUN      = 8'h84;
  localparam logic [7:0] S_STOP     = 8'h85;

  logic [7:0] nxt;

  always_comb begin
    nxt = state;
    case (state)
      S_INIT: begin
        if (!step_n)     nxt = S_STEP_DN;
        else if (!run_n) nxt = S_RUN_DN;
        else if (!go_n)  nxt = 8'h00;
      end
      S_INIT_END: if (go_n) nxt = S_INIT;
      S_STEP_DN:  if (step_n) nxt = S_STEP_CLK;
      S_STEP_CLK: nxt = S_STEP;
      S_STEP: begin
        if (!step_n)     nxt = S_STEP_DN;
        else if (!run_n) nxt = S_RUN_DN;
        else if (!go_n)  nxt = S_STOP;
      end
      S_RUN_DN:   if (run_n) nxt = S_RUN;
      S_RUN:      if (!go_n) nxt = S_STOP;
      S_STOP:     if (go_n) nxt = S_INIT;
      default: begin
        if (state < S_INIT_END) nxt = state + 8'd1;  // Init copy ring
        else                    nxt = S_INIT;        // unused codes
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_INIT;
    else     state <= nxt;
  end

  assign init_sel  = !state[7] && (state != S_INIT);
  assign init_adrs = state[6:0];
  assign cpu_en    = (state == S_STEP_CLK) || (state == S_RUN);
  assign led_init  = (state == S_INIT);
  assign led_run   = (state == S_RUN);
  assign led_step  = (state == S_STEP);
endmodule
