// ctrl_regs: the status/control register file. It holds the settings the
// laptop-side scripts program (SD clock divider, block length, block count,
// response timeout, the operation descriptor), turns control-word writes
// into start/abort/clear pulses, keeps sticky error flags and an
// operation-done flag, and returns register values for reads.
// Interface: wr/addr/wdata from the PCMCIA control unit (a write lands in the
// cycle wr is high); rdata is combinational on addr. The status word is
//   [15:12] FSM state (low 4 bits) [11] done [10] FSM busy
//   [9] timing overflow [8] raw overflow [7] write CRC status error
//   [6] read CRC error [5] response CRC error [4] response timeout
//   [3] timing FIFO empty [2] input FIFO empty [1] output FIFO empty
//   [0] output FIFO full
// irq is the done flag (an operation ended since the last clear). Reset
// values: clock divider 62 (about 400 kHz SD clock from a 50 MHz system
// clock, the identification-mode rate), 512-byte blocks, one block,
// 64-clock response timeout. Bit 0 of blklen is always 0: block lengths are
// kept even because 4-bit transfers move a whole byte per two clocks and
// the FIFOs hold two bytes per word. The register set follows the source's
// description of a status/control register configured by the scripts; its
// layout and reset values are this design's own.
module ctrl_regs
  import sd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [3:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // settings
  output logic        start,
  output logic        abort,
  output logic        clear,
  output op_t         op,
  output logic        clk_en,
  output logic [15:0] clkdiv,
  output logic [11:0] blklen,
  output logic [15:0] blkcnt,
  output logic [7:0]  ncr_max,
  output logic        irq,
  // status
  input  logic        fsm_busy,
  input  logic [3:0]  fsm_state,
  input  sticky_t     err_set,
  input  logic        out_full,
  input  logic        out_empty,
  input  logic        in_empty,
  input  logic        tim_empty,
  input  logic [15:0] out_level,
  input  logic [15:0] in_level,
  input  logic [15:0] tim_level,
  input  logic [15:0] blk_count,
  input  logic [15:0] ev_count
);
  sticky_t sticky;
  logic    done, busy_q;
  logic [15:0] status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start   <= 1'b0;
      abort   <= 1'b0;
      clear   <= 1'b0;
      op      <= '0;
      clk_en  <= 1'b0;
      clkdiv  <= 16'd62;
      blklen  <= 12'd512;
      blkcnt  <= 16'd1;
      ncr_max <= 8'd64;
      sticky  <= '0;
      done    <= 1'b0;
      busy_q  <= 1'b0;
    end else begin
      start  <= 1'b0;
      abort  <= 1'b0;
      clear  <= 1'b0;
      busy_q <= fsm_busy;
      sticky <= sticky | err_set;
      if (busy_q && !fsm_busy) done <= 1'b1;
      if (wr) begin
        case (addr)
          REG_CTRL: begin
            op.resp <= resp_type_e'(wdata[CTRL_RESP_LO +: 2]);
            op.dir  <= data_dir_e'(wdata[CTRL_DIR_LO +: 2]);
            op.wide <= wdata[CTRL_WIDE];
            op.raw  <= wdata[CTRL_RAW];
            clk_en  <= wdata[CTRL_CLKEN];
            start   <= wdata[CTRL_START] && !fsm_busy;
            abort   <= wdata[CTRL_ABORT];
            if (wdata[CTRL_START]) done <= 1'b0;
            if (wdata[CTRL_CLEAR]) begin
              clear  <= 1'b1;
              sticky <= '0;
              done   <= 1'b0;
            end
          end
          REG_CLKDIV: clkdiv  <= wdata;
          REG_BLKLEN: blklen  <= {wdata[11:1], 1'b0};
          REG_BLKCNT: blkcnt  <= wdata;
          REG_NCR:    ncr_max <= wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  assign irq = done;

  assign status = {fsm_state, done, fsm_busy, sticky.tim_overflow,
                   sticky.raw_overflow, sticky.wr_crc_status, sticky.data_crc,
                   sticky.resp_crc, sticky.resp_timeout, tim_empty, in_empty,
                   out_empty, out_full};

  always_comb begin
    case (addr)
      REG_CTRL:    rdata = status;
      REG_CLKDIV:  rdata = clkdiv;
      REG_BLKLEN:  rdata = {4'h0, blklen};
      REG_BLKCNT:  rdata = blkcnt;
      REG_OUTFIFO: rdata = out_level;
      REG_INLVL:   rdata = in_level;
      REG_TIMLVL:  rdata = tim_level;
      REG_NCR:     rdata = {8'h00, ncr_max};
      REG_BLKDONE: rdata = blk_count;
      REG_EVCNT:   rdata = ev_count;
      default:     rdata = 16'h0000;
    endcase
  end
endmodule
