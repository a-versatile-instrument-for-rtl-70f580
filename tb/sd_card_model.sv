// sd_card_model: behavioural model of an SD memory card, for testbenches
// only. It answers commands on CMD and moves data blocks on DAT0 or DAT[3:0]
// (wide), driving its outputs after the falling clock edge and sampling on
// the rising edge, as a card does.
//  - Every command is CRC7-checked and answered after NCR clocks: CMD2 with
//    a 136-bit response, every other with a 48-bit R1 (CMD12 as R1b).
//  - CMD18 (read multiple): T2 idle clocks after the response end bit the
//    first block starts, then each block follows the previous one after T3
//    idle clocks, until CMD12 arrives. Block b
//    (b = argument + k) byte i is pattern(b, i).
//  - CMD25 (write multiple): each block is received and CRC16-checked, the
//    bytes are compared with pattern(b + 100, i), a CRC status token is
//    returned and DAT0 is held low while all NBUF internal buffers are
//    full. One buffer is programmed to flash every TPROG clocks. After the
//    CMD12 response the card stays busy until all buffers are programmed.
// Counters report what the card saw, for the testbench to check.
module sd_card_model #(
  parameter int NCR    = 4,
  parameter int T2     = 20,
  parameter int T3     = 4,
  parameter int NBUF   = 2,
  parameter int TPROG  = 3000,
  parameter int BLKLEN = 512
) (
  input  logic       sd_clk,
  input  logic       wide,
  input  logic       cmd,          // resolved CMD line
  input  logic [3:0] dat,          // resolved DAT lines
  output logic       cmd_en,
  output logic       cmd_drv,
  output logic [3:0] dat_en,
  output logic [3:0] dat_drv
);
  import sd_pkg::*;

  int cmds_seen = 0, cmd_crc_errors = 0;
  int blocks_sent = 0, blocks_written = 0, wr_crc_errors = 0, wr_data_errors = 0;
  int holdoffs = 0;          // written blocks after which the buffers were full
  int used = 0;              // occupied internal buffers
  int prog_cnt = 0;
  bit rd_active = 0, wr_active = 0, rd_busy = 0;
  int rd_base = 0, wr_base = 0;
  logic [5:0] last_index;
  logic [31:0] last_arg;

  initial begin
    cmd_en = 0; cmd_drv = 1; dat_en = '0; dat_drv = '1;
  end

  function automatic logic [7:0] pattern(int b, int i);
    return 8'(b * 7 + i * 13 + 5);
  endfunction

  // ------------------------------------------------------ flash programming
  always @(posedge sd_clk) begin
    if (used > 0) begin
      prog_cnt++;
      if (prog_cnt >= TPROG) begin
        prog_cnt = 0;
        used--;
      end
    end
  end

  // ---------------------------------------------------------- command path
  task automatic send_bits(logic [135:0] bits, int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge sd_clk);
      cmd_en  = 1;
      cmd_drv = bits[i];
    end
    @(negedge sd_clk);
    cmd_en  = 0;
    cmd_drv = 1;
  endtask

  initial begin : cmd_proc
    logic [47:0] c;
    logic [39:0] r;
    forever begin
      @(posedge sd_clk);
      if (!cmd_en && cmd == 1'b0) begin
        c = '0;
        for (int i = 0; i < 47; i++) begin
          @(posedge sd_clk);
          c = {c[46:0], cmd};
        end
        c = {1'b0, c[46:0]};
        cmds_seen++;
        if (crc7_40(c[47:8]) != c[7:1] || c[0] != 1'b1) cmd_crc_errors++;
        last_index = c[45:40];
        last_arg   = c[39:8];
        if (last_index == 6'd12) begin
          rd_active = 0;
          wr_active = 0;
        end
        repeat (NCR) @(negedge sd_clk);
        if (last_index == 6'd2) begin
          send_bits({8'h3F, 120'h0123_4567_89AB_CDEF_FEDC_BA98_7654_32, 8'h01}, 136);
        end else begin
          r = {2'b00, last_index, 32'h0000_0900};
          send_bits({88'h0, r, crc7_40(r), 1'b1}, 48);
        end
        if (last_index == 6'd18) begin
          rd_base   = int'(last_arg);
          rd_active = 1;
        end
        if (last_index == 6'd25) begin
          wr_base   = int'(last_arg);
          wr_active = 1;
        end
        if (last_index == 6'd12) begin
          // R1b: busy while data is still being programmed
          @(negedge sd_clk);
          dat_en[0]  = 1;
          dat_drv[0] = 0;
          @(negedge sd_clk);
          while (used > 0) @(negedge sd_clk);
          dat_en[0]  = 0;
          dat_drv[0] = 1;
        end
      end
    end
  end

  // ------------------------------------------------------------- read path
  initial begin : rd_proc
    int b, nlines, ticks;
    logic [15:0] crc [4];
    logic [7:0] byt;
    forever begin
      wait (rd_active);
      begin
        // T2 idle clocks between the response end bit and the start bit
        repeat (T2 - 1) @(negedge sd_clk);
        b = rd_base;
        while (rd_active) begin
          nlines = wide ? 4 : 1;
          for (int k = 0; k < 4; k++) crc[k] = '0;
          @(negedge sd_clk);
          dat_en  = wide ? 4'hF : 4'h1;
          dat_drv = 4'h0;
          for (int i = 0; i < BLKLEN && rd_active; i++) begin
            byt = pattern(b, i);
            if (wide) begin
              for (int h = 1; h >= 0; h--) begin
                @(negedge sd_clk);
                dat_drv = byt[4*h +: 4];
                for (int k = 0; k < 4; k++) crc[k] = crc16_step(crc[k], byt[4*h + k]);
              end
            end else begin
              for (int j = 7; j >= 0; j--) begin
                @(negedge sd_clk);
                dat_drv = {3'b111, byt[j]};
                crc[0] = crc16_step(crc[0], byt[j]);
              end
            end
          end
          for (int j = 15; j >= 0 && rd_active; j--) begin
            @(negedge sd_clk);
            for (int k = 0; k < 4; k++) dat_drv[k] = (k < nlines) ? crc[k][j] : 1'b1;
          end
          if (rd_active) begin
            @(negedge sd_clk);
            dat_drv = 4'hF;
            blocks_sent++;
            b++;
          end
          @(negedge sd_clk);
          dat_en  = '0;
          dat_drv = 4'hF;
          for (int g = 1; g < T3 && rd_active; g++) @(negedge sd_clk);
        end
      end
    end
  end

  // ------------------------------------------------------------ write path
  initial begin : wr_proc
    int b, ticks;
    logic [15:0] crc [4], rx [4];
    logic [7:0] byt;
    bit bad;
    forever begin
      @(posedge sd_clk);
      if (wr_active && !dat_en[0] && dat[0] == 1'b0) begin
        if (!rd_busy) b = wr_base;
        rd_busy = 1;
        for (int k = 0; k < 4; k++) begin crc[k] = '0; rx[k] = '0; end
        bad = 0;
        for (int i = 0; i < BLKLEN; i++) begin
          if (wide) begin
            for (int h = 1; h >= 0; h--) begin
              @(posedge sd_clk);
              byt[4*h +: 4] = dat;
              for (int k = 0; k < 4; k++) crc[k] = crc16_step(crc[k], dat[k]);
            end
          end else begin
            for (int j = 7; j >= 0; j--) begin
              @(posedge sd_clk);
              byt[j] = dat[0];
              crc[0] = crc16_step(crc[0], dat[0]);
            end
          end
          if (byt != pattern(b + 100, i)) bad = 1;
        end
        for (int j = 0; j < 16; j++) begin
          @(posedge sd_clk);
          for (int k = 0; k < 4; k++) rx[k] = {rx[k][14:0], dat[k]};
        end
        @(posedge sd_clk);  // end bit
        if (rx[0] != crc[0] || (wide && (rx[1] != crc[1] || rx[2] != crc[2] || rx[3] != crc[3]))
            || dat[0] != 1'b1) wr_crc_errors++;
        if (bad) wr_data_errors++;
        blocks_written++;
        b++;
        used++;
        // CRC status token 0 010 1 two clocks later, then busy
        @(negedge sd_clk);
        @(negedge sd_clk);
        dat_en[0] = 1;
        for (int j = 4; j >= 0; j--) begin
          dat_drv[0] = 5'b00101 >> j;
          @(negedge sd_clk);
        end
        dat_drv[0] = 0;
        @(negedge sd_clk);
        if (used >= NBUF) holdoffs++;
        while (used >= NBUF) @(negedge sd_clk);
        dat_en[0]  = 0;
        dat_drv[0] = 1;
      end
      if (!wr_active) rd_busy = 0;
    end
  end
endmodule
