// sd_host_fsm: the device-interface FSM. It turns the contents of the output
// FIFO into SD bus bit-streams, captures what the card sends back into the
// input FIFO, and reports each interface event to the counters/timers.
//
// An operation starts with a pulse on start, with op, blklen and blkcnt
// stable. Its steps:
//  1. Command: three words are popped from the output FIFO: {8'h00, 0, 1,
//     index[5:0]}, argument[31:16], argument[15:0]. The FSM appends the CRC7
//     and the end bit and sends the 48 bits on CMD, MSB first.
//  2. Response (op.resp): waits up to ncr_max SD clocks for the start bit,
//     receives 48 or 136 bits and pushes them into the input FIFO as 16-bit
//     words, first bit in bit 15 (a 136-bit response ends with a half word
//     padded with zeros). The CRC7 of a 48-bit response is checked. R1b: waits
//     while the card holds DAT0 low (busy).
//  3. Data (op.dir), blkcnt blocks of blklen bytes on DAT0 (op.wide = 0) or
//     DAT[3:0] (op.wide = 1), each framed by a start bit, a CRC16 per line and
//     an end bit. Read: each block is awaited, received, CRC-checked and
//     pushed into the input FIFO. Write: before each block the FSM waits for
//     DAT0 to be high (not busy) for two clocks, then sends a block taken
//     from the output FIFO, reads the card's CRC status token, and waits
//     while the card signals busy on DAT0. This is how a card with full
//     internal buffers delays the host.
//  4. Stop: after the last block the next command in the output FIFO (the
//     script's "stop transmission") is sent, its response received, and
//     busy on DAT0 awaited (DAT0 high is believed from the third clock on).
// The SD clock comes from sd_clkgen; outputs change on its falling edge and
// the card's outputs are sampled from the pins on its rising edge, so any
// clkdiv works (0 gives clk/2, 25 MHz from a 50 MHz system clock). The
// clock is held low when the input FIFO is full during a response or read block, or the output FIFO is empty when a
// write word is needed: the card simply waits. In raw mode (op.raw) the
// decoded words are not stored; instead every rising SD clock edge of the
// operation samples {CMD, DAT[3:0]}, three samples per word ({0, s0, s1, s2},
// s0 oldest; a last partial word is filled with the idle level 11111), and
// a word that finds the input FIFO full is dropped and flagged. abort
// returns to idle at once and releases the bus. The tim_overflow field of
// err_set is always 0 here; that flag comes from the counters/timers.
// What follows the source description: command/response/data framing with
// start and stop bits and CRC, 1- or 4-bit data, multiple-block transfers
// ended by a stop command, the DAT0 busy hold-off, the FIFO roles, the
// programmable clock and the recorded intervals. The FIFO word formats, the
// two-clock write gap, the stall policy and the error handling are this
// design's own choices.
module sd_host_fsm
  import sd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start,
  input  logic        abort,
  input  op_t         op,
  input  logic        clk_en,
  input  logic [15:0] clkdiv,
  input  logic [11:0] blklen,     // bytes, even, at least 2
  input  logic [15:0] blkcnt,
  input  logic [7:0]  ncr_max,
  output logic        busy,
  output logic [3:0]  state_o,
  output sticky_t     err_set,    // one-cycle pulses, tim_overflow unused (0)
  // output FIFO, read side
  input  logic [15:0] out_rdata,
  input  logic        out_empty,
  output logic        out_pop,
  // input FIFO, write side
  input  logic        in_full,
  output logic        in_push,
  output logic [15:0] in_wdata,
  // events to the counters/timers
  output logic        ev_valid,
  output event_e      ev_code,
  // SD bus (tri-state buffers are at the pins)
  output logic        sd_clk,
  output logic        cmd_o,
  output logic        cmd_oe,
  input  logic        cmd_i,
  output logic [3:0]  dat_o,
  output logic [3:0]  dat_oe,
  input  logic [3:0]  dat_i
);

  typedef enum logic [3:0] {
    S_IDLE, S_CMD_LOAD, S_CMD_SEND, S_RESP_WAIT, S_RESP_RECV, S_BUSY,
    S_RD_WAIT, S_RD_DATA, S_RD_CRC, S_WR_PRE, S_WR_START, S_WR_DATA,
    S_WR_CRC, S_WR_TOKEN, S_WR_BUSY, S_DONE
  } state_e;

  state_e state;
  sticky_t err_r;
  logic raw_ovf;
  assign state_o = state;
  assign busy    = (state != S_IDLE);

  // ---------------------------------------------------------------- SD clock
  logic rise, fall, stall;
  logic [4:0] wbits;          // bits left in the write word
  sd_clkgen u_clk (
    .clk, .rst_n, .en(clk_en), .div(clkdiv), .stall,
    .sd_clk, .rise, .fall
  );

  // ------------------------------------------------------------ bus inputs
  // CMD and DAT are driven by the card in step with the SD clock this block
  // generates (source-synchronous), so they are sampled straight from the
  // pins on the rising-edge tick, as an SD host samples on the rising edge.
  logic       cmd_s;
  logic [3:0] dat_s;
  assign cmd_s = cmd_i;
  assign dat_s = dat_i;

  // --------------------------------------------------------------- datapath
  op_t         cur;           // latched operation
  logic        stop_phase;
  logic [1:0]  ldcnt;
  logic [15:0] cw0, cw1;
  logic [47:0] cmd_sr;
  logic [7:0]  bitcnt;        // command/response bit count
  logic [7:0]  ncnt;          // response wait count
  logic [47:0] rsp48;
  logic [15:0] word_sr;
  logic [4:0]  wfill;         // bits gathered into word_sr
  logic [15:0] wsr;           // write shift register
  logic [14:0] dcnt;          // data ticks left in the block
  logic [4:0]  ccnt;          // CRC/token bit count
  logic [15:0] crc [4];
  logic [3:0]  crc_bad;
  logic [15:0] blk_done;
  logic        busy_seen;
  logic [2:0]  token;
  logic [1:0]  nwr;

  logic [14:0] ticks_per_block;
  assign ticks_per_block = cur.wide ? 15'({blklen, 1'b0}) : 15'({blklen, 3'b000});

  logic [8:0]  resp_bits;
  assign resp_bits = (cur.resp == RESP_136) ? 9'd136 : 9'd48;

  // decoded words go to the input FIFO only outside raw mode
  logic dec_push;
  logic [15:0] dec_word;
  logic raw_push;
  logic [15:0] raw_word;

  assign in_push  = cur.raw ? raw_push : dec_push;
  assign in_wdata = cur.raw ? raw_word : dec_word;

  assign stall = (!cur.raw && in_full && (state == S_RESP_RECV || state == S_RD_DATA))
              || (state == S_WR_DATA && wbits == 0 && out_empty);

  // current write word and its bits for this tick
  logic [15:0] wr_word;
  logic [4:0]  wr_left;
  assign wr_word = (wbits == 0) ? out_rdata : wsr;
  assign wr_left = (wbits == 0) ? 5'd16 : wbits;

  // next step after a command's response (and busy, if any)
  function automatic state_e after_resp(op_t o, logic stop, logic with_busy);
    if (stop || with_busy) return S_BUSY;
    return after_busy(o, stop);
  endfunction
  function automatic state_e after_busy(op_t o, logic stop);
    if (stop) return S_DONE;
    if (blkcnt == 0) return S_DONE;
    case (o.dir)
      DIR_READ:  return S_RD_WAIT;
      DIR_WRITE: return S_WR_PRE;
      default:   return S_DONE;
    endcase
  endfunction

  // data block end: next block or the stop command
  function automatic state_e after_block(logic [15:0] done_now, state_e nxt);
    return (done_now == blkcnt) ? S_CMD_LOAD : nxt;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      stop_phase <= 1'b0;
      ldcnt      <= '0;
      cw0        <= '0;
      cw1        <= '0;
      cmd_sr     <= '1;
      bitcnt     <= '0;
      ncnt       <= '0;
      rsp48      <= '0;
      word_sr    <= '0;
      wfill      <= '0;
      wsr        <= '0;
      wbits      <= '0;
      dcnt       <= '0;
      ccnt       <= '0;
      for (int k = 0; k < 4; k++) crc[k] <= '0;
      crc_bad    <= '0;
      blk_done   <= '0;
      busy_seen  <= 1'b0;
      token      <= '0;
      nwr        <= '0;
      cmd_o      <= 1'b1;
      cmd_oe     <= 1'b0;
      dat_o      <= '1;
      dat_oe     <= '0;
      out_pop    <= 1'b0;
      dec_push   <= 1'b0;
      dec_word   <= '0;
      ev_valid   <= 1'b0;
      ev_code    <= EV_NONE;
      err_r      <= '0;
    end else begin
      out_pop  <= 1'b0;
      dec_push <= 1'b0;
      ev_valid <= 1'b0;
      err_r    <= '0;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            cur        <= op;
            stop_phase <= 1'b0;
            ldcnt      <= '0;
            blk_done   <= '0;
            state      <= S_CMD_LOAD;
          end
        end

        // pop the three command words (one pop per two cycles so the
        // registered pop has reached the FIFO before the next look)
        S_CMD_LOAD: begin
          if (!out_empty && !out_pop) begin
            out_pop <= 1'b1;
            ldcnt   <= ldcnt + 1'b1;
            case (ldcnt)
              2'd0: cw0 <= out_rdata;
              2'd1: cw1 <= out_rdata;
              default: begin
                cmd_sr <= {cw0[7:0], cw1, out_rdata,
                           crc7_40({cw0[7:0], cw1, out_rdata}), 1'b1};
                bitcnt <= '0;
                ldcnt  <= '0;
                state  <= S_CMD_SEND;
              end
            endcase
          end
        end

        S_CMD_SEND: if (fall) begin
          if (bitcnt == 8'd48) begin
            cmd_oe   <= 1'b0;
            cmd_o    <= 1'b1;
            ev_valid <= 1'b1;
            ev_code  <= EV_CMD_END;
            ncnt     <= '0;
            if (cur.resp == RESP_NONE && !stop_phase) state <= after_busy(cur, 1'b0);
            else state <= S_RESP_WAIT;
          end else begin
            cmd_oe <= 1'b1;
            cmd_o  <= cmd_sr[47];
            cmd_sr <= {cmd_sr[46:0], 1'b1};
            bitcnt <= bitcnt + 1'b1;
          end
        end

        S_RESP_WAIT: if (rise) begin
          if (!cmd_s) begin
            ev_valid <= 1'b1;
            ev_code  <= EV_RESP_START;
            bitcnt   <= 8'd1;
            rsp48    <= '0;
            word_sr  <= '0;
            wfill    <= 5'd1;
            state    <= S_RESP_RECV;
          end else if (ncnt >= ncr_max) begin
            ev_valid            <= 1'b1;
            ev_code             <= EV_RESP_TIMEOUT;
            err_r.resp_timeout <= 1'b1;
            state               <= S_DONE;
          end else begin
            ncnt <= ncnt + 1'b1;
          end
        end

        S_RESP_RECV: if (rise) begin
          logic [47:0] r;
          logic [15:0] w;
          r = {rsp48[46:0], cmd_s};
          w = {word_sr[14:0], cmd_s};
          rsp48   <= r;
          word_sr <= w;
          bitcnt  <= bitcnt + 1'b1;
          if (wfill == 5'd15) begin
            dec_push <= 1'b1;
            dec_word <= w;
            wfill    <= '0;
          end else begin
            wfill <= wfill + 1'b1;
          end
          if (9'(bitcnt) + 9'd1 == resp_bits) begin
            ev_valid <= 1'b1;
            ev_code  <= EV_RESP_END;
            if (cur.resp == RESP_136) begin
              dec_push <= 1'b1;
              dec_word <= {w[7:0], 8'h00};
            end else if (crc7_40(r[47:8]) != r[7:1]) begin
              err_r.resp_crc <= 1'b1;
            end
            busy_seen <= 1'b0;
            ncnt      <= '0;
            state     <= after_resp(cur, stop_phase, cur.resp == RESP_48B);
          end
        end

        // busy after an R1b response; the card may take up to two clocks
        // to pull DAT0 low, so DAT0 high counts only from the third sample
        S_BUSY: if (rise) begin
          if (ncnt < 8'd2) ncnt <= ncnt + 1'b1;
          if (!dat_s[0]) begin
            if (!busy_seen) begin
              busy_seen <= 1'b1;
              ev_valid  <= 1'b1;
              ev_code   <= EV_BUSY_START;
            end
          end else if (ncnt >= 8'd2 || busy_seen) begin
            if (busy_seen) begin
              ev_valid <= 1'b1;
              ev_code  <= EV_BUSY_END;
            end
            nwr   <= '0;
            state <= after_busy(cur, stop_phase);
          end
        end

        // ------------------------------------------------------------ read
        S_RD_WAIT: if (rise && !dat_s[0]) begin
          ev_valid <= 1'b1;
          ev_code  <= EV_DATA_START;
          for (int k = 0; k < 4; k++) crc[k] <= '0;
          crc_bad  <= '0;
          wfill    <= '0;
          dcnt     <= ticks_per_block;
          state    <= S_RD_DATA;
        end

        S_RD_DATA: if (rise) begin
          logic [15:0] w;
          logic [4:0]  f;
          if (cur.wide) begin
            w = {word_sr[11:0], dat_s};
            f = wfill + 5'd4;
            for (int k = 0; k < 4; k++) crc[k] <= crc16_step(crc[k], dat_s[k]);
          end else begin
            w = {word_sr[14:0], dat_s[0]};
            f = wfill + 5'd1;
            crc[0] <= crc16_step(crc[0], dat_s[0]);
          end
          word_sr <= w;
          if (f == 5'd16) begin
            dec_push <= 1'b1;
            dec_word <= w;
            wfill    <= '0;
          end else begin
            wfill <= f;
          end
          dcnt <= dcnt - 1'b1;
          if (dcnt == 15'd1) begin
            ccnt  <= '0;
            state <= S_RD_CRC;
          end
        end

        S_RD_CRC: if (rise) begin
          if (ccnt == 5'd16) begin
            // end bit
            ev_valid <= 1'b1;
            ev_code  <= EV_DATA_END;
            if (crc_bad != 0) err_r.data_crc <= 1'b1;
            blk_done   <= blk_done + 1'b1;
            stop_phase <= (blk_done + 1'b1 == blkcnt);
            state      <= after_block(blk_done + 1'b1, S_RD_WAIT);
          end else begin
            for (int k = 0; k < 4; k++)
              if ((cur.wide || k == 0) && dat_s[k] != crc[k][15]) crc_bad[k] <= 1'b1;
            for (int k = 0; k < 4; k++) crc[k] <= {crc[k][14:0], 1'b0};
            ccnt <= ccnt + 1'b1;
          end
        end

        // ----------------------------------------------------------- write
        S_WR_PRE: if (rise) begin
          if (!dat_s[0]) nwr <= '0;
          else if (nwr == 2'd1) state <= S_WR_START;
          else nwr <= nwr + 1'b1;
        end

        S_WR_START: if (fall) begin
          dat_oe   <= cur.wide ? 4'hF : 4'h1;
          dat_o    <= 4'h0;
          ev_valid <= 1'b1;
          ev_code  <= EV_DATA_START;
          for (int k = 0; k < 4; k++) crc[k] <= '0;
          wbits    <= '0;
          dcnt     <= ticks_per_block;
          state    <= S_WR_DATA;
        end

        S_WR_DATA: if (fall) begin
          if (wbits == 0) out_pop <= 1'b1;
          if (cur.wide) begin
            dat_o <= wr_word[15:12];
            wsr   <= {wr_word[11:0], 4'h0};
            wbits <= wr_left - 5'd4;
            for (int k = 0; k < 4; k++) crc[k] <= crc16_step(crc[k], wr_word[12+k]);
          end else begin
            dat_o <= {3'b111, wr_word[15]};
            wsr   <= {wr_word[14:0], 1'b0};
            wbits <= wr_left - 5'd1;
            crc[0] <= crc16_step(crc[0], wr_word[15]);
          end
          dcnt <= dcnt - 1'b1;
          if (dcnt == 15'd1) begin
            ccnt  <= '0;
            state <= S_WR_CRC;
          end
        end

        // 16 CRC bits per line, then the end bit, then release the lines
        S_WR_CRC: if (fall) begin
          if (ccnt == 5'd16) begin
            dat_o    <= 4'hF;
            ev_valid <= 1'b1;
            ev_code  <= EV_DATA_END;
          end else if (ccnt == 5'd17) begin
            dat_oe <= '0;
            ncnt   <= '0;
            token  <= '0;
            state  <= S_WR_TOKEN;
          end else begin
            for (int k = 0; k < 4; k++) begin
              dat_o[k] <= (cur.wide || k == 0) ? crc[k][15] : 1'b1;
              crc[k]   <= {crc[k][14:0], 1'b0};
            end
          end
          ccnt <= (ccnt == 5'd17) ? 5'd0 : ccnt + 1'b1;
        end

        // CRC status token: start bit, 3 status bits, end bit, then busy
        S_WR_TOKEN: if (rise) begin
          if (ccnt == 0) begin
            if (!dat_s[0]) ccnt <= 5'd1;
            else if (ncnt >= ncr_max) begin
              err_r.wr_crc_status <= 1'b1;
              busy_seen <= 1'b0;
              ccnt      <= '0;
              state     <= S_WR_BUSY;
            end else ncnt <= ncnt + 1'b1;
          end else if (ccnt <= 5'd3) begin
            token <= {token[1:0], dat_s[0]};
            ccnt  <= ccnt + 1'b1;
          end else begin
            // end bit
            if (token != 3'b010) err_r.wr_crc_status <= 1'b1;
            busy_seen <= 1'b0;
            state     <= S_WR_BUSY;
          end
        end

        // card busy after a written block: the host holds the next block
        S_WR_BUSY: if (rise) begin
          if (!dat_s[0]) begin
            if (!busy_seen) begin
              busy_seen <= 1'b1;
              ev_valid  <= 1'b1;
              ev_code   <= EV_BUSY_START;
            end
          end else begin
            if (busy_seen) begin
              ev_valid <= 1'b1;
              ev_code  <= EV_BUSY_END;
            end
            nwr        <= '0;
            blk_done   <= blk_done + 1'b1;
            stop_phase <= (blk_done + 1'b1 == blkcnt);
            state      <= after_block(blk_done + 1'b1, S_WR_PRE);
          end
        end

        S_DONE: begin
          ev_valid <= 1'b1;
          ev_code  <= EV_OP_DONE;
          cmd_oe   <= 1'b0;
          dat_oe   <= '0;
          state    <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase

      if (abort) begin
        state  <= S_IDLE;
        cmd_oe <= 1'b0;
        cmd_o  <= 1'b1;
        dat_oe <= '0;
        dat_o  <= '1;
      end
    end
  end

  // ------------------------------------------------------------ raw capture
  logic [1:0] raw_cnt;
  logic [9:0] raw_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_cnt  <= '0;
      raw_sr   <= '0;
      raw_push <= 1'b0;
      raw_word <= '0;
      raw_ovf  <= 1'b0;
    end else begin
      raw_push <= 1'b0;
      raw_ovf  <= 1'b0;
      if (state == S_IDLE) begin
        raw_cnt <= '0;
      end else if (state == S_DONE && cur.raw && raw_cnt != 0) begin
        // flush the last partial word, empty slots at the idle level
        raw_cnt <= '0;
        if (in_full) raw_ovf <= 1'b1;
        else begin
          raw_push <= 1'b1;
          raw_word <= (raw_cnt == 2'd1) ? {1'b0, raw_sr[4:0], 10'h3FF}
                                        : {1'b0, raw_sr, 5'h1F};
        end
      end else if (cur.raw && rise) begin
        if (raw_cnt == 2'd2) begin
          raw_cnt <= '0;
          if (in_full) raw_ovf <= 1'b1;
          else begin
            raw_push <= 1'b1;
            raw_word <= {1'b0, raw_sr, cmd_s, dat_s};
          end
        end else begin
          raw_cnt <= raw_cnt + 1'b1;
          raw_sr  <= {raw_sr[4:0], cmd_s, dat_s};
        end
      end
    end
  end

  always_comb begin
    err_set = err_r;
    err_set.raw_overflow = raw_ovf;
    err_set.tim_overflow = 1'b0;
  end

  // a command is three words and a started operation always sends one
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) out_pop |-> !out_empty);
  a_push_notfull: assert property (@(posedge clk) disable iff (!rst_n) dec_push && !cur.raw |-> !in_full);

endmodule
