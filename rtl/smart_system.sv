// smart_system: SMaRT with the sorting coprocessor on its I/O port.
//
// The processor (smart_cpu) and the 32-key sorting coprocessor
// (sort_coprocessor) share the memory-mapped I/O bus: aBus, dBusO, dBusI,
// IORE and IOWE. The coprocessor answers at 0x8000 (reset / status) and
// 0x8001 (key data / clock). With the default memory contents the system
// runs the sorting example: GO copies the data ROM (32 keys at words 10..41)
// into the data memory, Run executes the program, which sends the keys to the
// coprocessor and stores them back in descending order at words 42..73; the
// result can then be read through the Manual address switches (SW17, SW6:0)
// on disp_lo. The board's seven-segment decoders and LEDs are outside this
// module: it outputs the values they show.
module smart_system #(
  parameter int unsigned N_KEYS   = 32,
  parameter int unsigned IM_WORDS = 256,
  parameter int unsigned DM_WORDS = 128
) (
  input  logic        clk,
  input  logic        pc_reset,
  input  logic        key_run_n,
  input  logic        key_go_n,
  input  logic        key_step_n,
  input  logic        sw16,
  input  logic        sw17,
  input  logic [6:0]  sw_man_adrs,
  output logic [15:0] disp_hi,
  output logic [15:0] disp_lo,
  output logic [7:0]  led_state,
  output logic        led_init,
  output logic        led_run,
  output logic        led_step
);
  logic [15:0] a_bus, d_bus_o, d_bus_i;
  logic        io_re, io_we;

  smart_cpu #(.IM_WORDS(IM_WORDS), .DM_WORDS(DM_WORDS)) u_cpu (
    .clk(clk), .pc_reset(pc_reset), .key_run_n(key_run_n), .key_go_n(key_go_n),
    .key_step_n(key_step_n), .sw16(sw16), .sw17(sw17), .sw_man_adrs(sw_man_adrs),
    .a_bus(a_bus), .d_bus_o(d_bus_o), .d_bus_i(d_bus_i), .io_re(io_re), .io_we(io_we),
    .disp_hi(disp_hi), .disp_lo(disp_lo), .led_state(led_state),
    .led_init(led_init), .led_run(led_run), .led_step(led_step)
  );

  sort_coprocessor #(.N_KEYS(N_KEYS), .KEY_W(16)) u_sorter (
    .clk(clk), .a_bus(a_bus), .d_bus_o(d_bus_o), .io_we(io_we), .io_re(io_re), .d_bus_i(d_bus_i)
  );
endmodule
