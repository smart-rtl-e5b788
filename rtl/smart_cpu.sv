// smart_cpu: the SMaRT processor with its memories and board controls.
//
// A single-cycle 16-bit load/store processor: every instruction is fetched,
// decoded, executed and written back in one clock-enabled cycle, except the
// long branches baleq/balne, whose second word (the 16-bit offset) takes a
// second cycle. The parts are the program counter (smart_pc), instruction
// memory (smart_imem), register-address decoder with the msbRs/msbRd
// flip-flops and the 2.5-address incrementor (smart_reg_decoder), 16 x 16
// register file (smart_regfile), ALU (smart_alu), control unit with the
// balPrevious cell (smart_control), 128-word data memory (smart_dmem), Init
// data ROM (smart_init_rom) and the mode controller (smart_mode_ctrl).
//
// Datapath, as the document draws it:
//   ALUm = balPrevious ? PC : Rdata1;  ALUn = Rdata2 | constant 1 | sign-extended constant.
//   aBus = ALUout. A load or store whose address has bit 15 set is I/O: it
//   raises IORE or IOWE, takes dBusI instead of the data memory, and a store
//   does not write the data memory. dBusO = Rdata2 (the store data).
//   Write data = ALUout (ALU and link), dBusI (I/O load) or dMemOut (load).
//   Data-memory address = InitAdrs in Init, else SW6:0 when SW17 (Manual) is
//   on, else ALUout[6:0]; data-memory write data = InitData in Init, else
//   Rdata2.
//   Displays: disp_hi = SW16 ? instruction : PC, disp_lo = dMemOut.
// Timing: one clock drives everything; the processor state (PC, registers,
// msb and long-branch cells, stores, IORE/IOWE) advances only in cycles where
// the mode controller enables it (one cycle per Step press, every cycle in
// Run). Running from one clock with an enable, rather than from a clock made
// by a pushbutton, is this design's choice.
module smart_cpu
  import smart_pkg::*;
#(
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
  // memory-mapped I/O bus
  output logic [15:0] a_bus,
  output logic [15:0] d_bus_o,
  input  logic [15:0] d_bus_i,
  output logic        io_re,
  output logic        io_we,
  // board outputs
  output logic [15:0] disp_hi,
  output logic [15:0] disp_lo,
  output logic [7:0]  led_state,
  output logic        led_init,
  output logic        led_run,
  output logic        led_step
);
  localparam int unsigned IAW = $clog2(IM_WORDS);
  localparam int unsigned DAW = $clog2(DM_WORDS);

  ctrl_t       ctrl;
  logic        cpu_en, init_sel, successful_b, eq, io;
  logic [6:0]  init_adrs;
  logic [15:0] pc, instr, boffset;
  logic [3:0]  radrs1, radrs2, wadrs;
  logic [15:0] rdata1, rdata2, wdata, alu_m, alu_n, alu_out;
  logic [15:0] dmem_out, dmem_wdata, init_data;
  logic [DAW-1:0] dmem_adrs;

  smart_mode_ctrl u_mode (
    .clk(clk), .rst(pc_reset), .run_n(key_run_n), .go_n(key_go_n), .step_n(key_step_n),
    .state(led_state), .init_sel(init_sel), .init_adrs(init_adrs), .cpu_en(cpu_en),
    .led_init(led_init), .led_run(led_run), .led_step(led_step)
  );

  smart_pc u_pc (
    .clk(clk), .rst(pc_reset), .en(cpu_en), .successful_b(successful_b), .rtn(ctrl.rtn),
    .boffset(boffset), .rdata1(rdata1), .pc(pc), .pc_plus1()
  );

  smart_imem #(.WORDS(IM_WORDS)) u_imem (.addr(pc[IAW-1:0]), .instr(instr));

  smart_control u_ctrl (
    .clk(clk), .rst(pc_reset), .en(cpu_en), .instr(instr), .eq(eq),
    .ctrl(ctrl), .successful_b(successful_b)
  );

  smart_reg_decoder u_dec (
    .clk(clk), .rst(pc_reset), .en(cpu_en), .instr(instr),
    .is_rl(ctrl.is_rl), .is_sff(ctrl.is_sff), .is_branch(ctrl.is_branch), .cdr(ctrl.cdr),
    .force_r1_rd(ctrl.rtn), .force_r1_wr(ctrl.force_r1_wr),
    .radrs1(radrs1), .radrs2(radrs2), .wadrs(wadrs), .msb_rs(), .msb_rd()
  );

  smart_regfile u_rf (
    .clk(clk), .rst(pc_reset), .we(cpu_en && ctrl.we_rf),
    .a1(radrs1), .a2(radrs2), .a3(wadrs), .d3(wdata), .rdata1(rdata1), .rdata2(rdata2)
  );

  assign boffset = ctrl.boffset_long ? instr : b_offset(instr);
  assign alu_m   = ctrl.alu_m_pc ? pc : rdata1;
  always_comb begin
    case (ctrl.alu_src_n)
      SRCN_IMM: alu_n = lsi_const(instr);
      SRCN_ONE: alu_n = 16'd1;
      default:  alu_n = rdata2;
    endcase
  end

  smart_alu u_alu (.op(ctrl.alu_op), .m(alu_m), .n(alu_n), .y(alu_out), .eq(eq));

  // memory-mapped I/O: address bit 15 set
  assign a_bus   = alu_out;
  assign io      = alu_out[15];
  assign d_bus_o = dmem_wdata;
  assign io_re   = cpu_en && ctrl.mem_read  && io;
  assign io_we   = cpu_en && ctrl.mem_write && io;

  smart_init_rom #(.WORDS(DM_WORDS)) u_rom (.addr(init_adrs[DAW-1:0]), .data(init_data));

  always_comb begin
    if (init_sel)  dmem_adrs = init_adrs[DAW-1:0];
    else if (sw17) dmem_adrs = sw_man_adrs[DAW-1:0];
    else           dmem_adrs = alu_out[DAW-1:0];
  end
  assign dmem_wdata = init_sel ? init_data : rdata2;

  smart_dmem #(.WORDS(DM_WORDS)) u_dmem (
    .clk(clk), .we1(cpu_en && ctrl.mem_write && !io), .we2(init_sel),
    .addr(dmem_adrs), .wdata(dmem_wdata), .rdata(dmem_out)
  );

  always_comb begin
    if (ctrl.alu_to_reg) wdata = alu_out;
    else if (io)         wdata = d_bus_i;
    else                 wdata = dmem_out;
  end

  assign disp_hi = sw16 ? instr : pc;
  assign disp_lo = dmem_out;

  // a store and a long-branch offset word never coincide
  a_no_store_in_offset: assert property (@(posedge clk) disable iff (pc_reset)
    ctrl.bal_previous |-> !ctrl.mem_write);
endmodule
