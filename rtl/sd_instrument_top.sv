// sd_instrument_top: the FPGA logic of the peripheral-interface analyzer,
// configured as an SD memory card host adapter. A laptop runs test scripts
// and reaches this logic over the PCMCIA bus; the logic turns what the
// scripts write into SD bus bit-streams, records what the card sends back,
// and time-stamps every interface event, so that a script can measure
// command response times, read access time, block time, inter-block gaps
// and write busy times, and from them the card's sustained data rate.
//
// Blocks and data flow:
//   PCMCIA pins -> pcmcia_ctrl -> ctrl_regs (status/control register)
//                             -> output FIFO -> sd_host_fsm -> SD pins
//   SD pins -> sd_host_fsm -> input FIFO  -> pcmcia_ctrl (read mux)
//   sd_host_fsm events -> event_timer -> timing FIFO -> pcmcia_ctrl
//   cis_rom -> pcmcia_ctrl (attribute memory)
// Tri-state pads are outside: every bidirectional pin is split into an
// input, an output and an output enable. ireq_n (active low) is the
// operation-done flag. An abort from the control register also empties the
// three FIFOs. FIFO levels read through the registers saturate at FFFFh. The block structure follows the source's block diagram; the
// FIFO depths are this design's choice.
module sd_instrument_top
  import sd_pkg::*;
#(
  // Sized so that one whole test command of 256 sectors of 512 bytes, with
  // its command, responses and stop command, is held on the board until
  // the laptop fetches it after the experiment.
  parameter int OUT_DEPTH = 65600, // 16-bit words: 65536 data + commands
  parameter int IN_DEPTH  = 65600, // 16-bit words: 65536 data + responses
  parameter int TIM_DEPTH = 2048,  // 32-bit records: 4 per written block + overhead
  parameter int CIS_AW    = 6      // 64-byte CIS ROM
) (
  input  logic        clk,
  input  logic        rst_n,
  // PC Card bus
  input  logic        ce1_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        reg_n,
  input  logic [7:0]  a,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  output logic        ireq_n,
  // SD card bus
  output logic        sd_clk,
  output logic        sd_cmd_o,
  output logic        sd_cmd_oe,
  input  logic        sd_cmd_i,
  output logic [3:0]  sd_dat_o,
  output logic [3:0]  sd_dat_oe,
  input  logic [3:0]  sd_dat_i
);
  localparam int OUT_LW = $clog2(OUT_DEPTH) + 1;
  localparam int IN_LW  = $clog2(IN_DEPTH) + 1;
  localparam int TIM_LW = $clog2(TIM_DEPTH) + 1;

  // FIFO levels as 16-bit register values, saturating at FFFFh
  function automatic logic [15:0] sat16(logic [31:0] v);
    return (v > 32'hFFFF) ? 16'hFFFF : v[15:0];
  endfunction

  // register file
  logic        reg_wr;
  logic [3:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic        start, abort, clear, clk_en, irq;
  op_t         op;
  logic [15:0] clkdiv, blkcnt;
  logic [11:0] blklen;
  logic [7:0]  ncr_max;

  // FIFOs
  logic        out_push, out_pop, out_full, out_empty;
  logic [15:0] out_wdata, out_rdata;
  logic [OUT_LW-1:0] out_level;
  logic        in_push, in_pop, in_full, in_empty;
  logic [15:0] in_wdata, in_rdata;
  logic [IN_LW-1:0] in_level;
  logic        tim_push, tim_pop, tim_full, tim_empty;
  logic [TIM_W-1:0] tim_wdata, tim_rdata;
  logic [TIM_LW-1:0] tim_level;

  // FSM, timers, ROM
  logic        fsm_busy;
  logic [3:0]  fsm_state;
  sticky_t     fsm_err, err_all;
  logic        ev_valid;
  event_e      ev_code;
  logic        tim_ovf;
  logic [15:0] ev_count, blk_count;
  logic [CIS_AW-1:0] cis_addr;
  logic [7:0]  cis_data;

  pcmcia_ctrl #(.CIS_AW(CIS_AW)) u_pcmcia (
    .clk, .rst_n,
    .ce1_n, .oe_n, .we_n, .reg_n, .a, .d_in, .d_out, .d_oe,
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .out_push, .out_wdata,
    .in_pop, .in_rdata,
    .tim_pop, .tim_rdata,
    .cis_addr, .cis_data
  );

  cis_rom #(.AW(CIS_AW)) u_cis (.addr(cis_addr), .data(cis_data));

  always_comb begin
    err_all = fsm_err;
    err_all.tim_overflow = tim_ovf;
  end

  ctrl_regs u_regs (
    .clk, .rst_n,
    .wr(reg_wr), .addr(reg_addr), .wdata(reg_wdata), .rdata(reg_rdata),
    .start, .abort, .clear, .op, .clk_en, .clkdiv, .blklen, .blkcnt, .ncr_max,
    .irq,
    .fsm_busy, .fsm_state, .err_set(err_all),
    .out_full, .out_empty, .in_empty, .tim_empty,
    .out_level(sat16(32'(out_level))), .in_level(sat16(32'(in_level))),
    .tim_level(sat16(32'(tim_level))),
    .blk_count, .ev_count
  );

  sync_fifo #(.WIDTH(16), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .flush(abort),
    .push(out_push), .wdata(out_wdata), .pop(out_pop), .rdata(out_rdata),
    .full(out_full), .empty(out_empty), .level(out_level)
  );

  sync_fifo #(.WIDTH(16), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n, .flush(abort),
    .push(in_push), .wdata(in_wdata), .pop(in_pop), .rdata(in_rdata),
    .full(in_full), .empty(in_empty), .level(in_level)
  );

  sync_fifo #(.WIDTH(TIM_W), .DEPTH(TIM_DEPTH)) u_tim_fifo (
    .clk, .rst_n, .flush(abort),
    .push(tim_push), .wdata(tim_wdata), .pop(tim_pop), .rdata(tim_rdata),
    .full(tim_full), .empty(tim_empty), .level(tim_level)
  );

  sd_host_fsm u_fsm (
    .clk, .rst_n,
    .start, .abort, .op, .clk_en, .clkdiv, .blklen, .blkcnt, .ncr_max,
    .busy(fsm_busy), .state_o(fsm_state), .err_set(fsm_err),
    .out_rdata, .out_empty, .out_pop,
    .in_full, .in_push, .in_wdata,
    .ev_valid, .ev_code,
    .sd_clk, .cmd_o(sd_cmd_o), .cmd_oe(sd_cmd_oe), .cmd_i(sd_cmd_i),
    .dat_o(sd_dat_o), .dat_oe(sd_dat_oe), .dat_i(sd_dat_i)
  );

  event_timer u_timer (
    .clk, .rst_n, .clear,
    .ev_valid, .ev_code,
    .tim_full, .tim_push, .tim_wdata,
    .overflow(tim_ovf), .ev_count, .blk_count
  );

  assign ireq_n = !irq;

endmodule
