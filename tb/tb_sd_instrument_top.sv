// tb_sd_instrument_top: end-to-end test of the analyzer at its default
// sizes. A host model runs asynchronous PC Card cycles, exactly as the
// laptop's scripts would, against sd_instrument_top, which drives the
// behavioural SD card. Sequence:
//   CIS read; clock set-up; CMD0 without response; CMD8 with R1; CMD2 with
//   a 136-bit response; a 4-bit multiple-block read of 4 blocks; the read
//   workload of the source, 256 sectors of 512 bytes kept on the board and
//   fetched afterwards, with its sustained rate computed; a read of
//   257 blocks, more than the input FIFO holds, left unread until the SD
//   clock stalls on the full FIFO; a 4-bit multiple-block write of 4 blocks into a card with two
//   buffers (DAT0 busy hold-off), with the host feeding the output FIFO
//   slowly for one block (SD clock stall on an empty FIFO); the measurement
//   workload of the source, a write of 256 sectors of 512 bytes run from a
//   preloaded output FIFO with its sustained rate computed from the timing
//   records; a read with a
//   corrupted data bit (CRC error flag); a response timeout; raw capture;
//   an abort that flushes the FIFOs; and a run of events past the timing
//   FIFO's depth without reading it (timing overflow).
// Every response word, data word and card-side counter is checked, the
// timing records are decoded and the block time is checked to the clock,
// and each mechanism is counted: one that never happened is a failure.
`timescale 1ns / 1ps
module tb_sd_instrument_top;
  import sd_pkg::*;

  localparam int DIV = 0, PER = 2 * (DIV + 1);
  localparam int OUT_DEPTH = 65600, IN_DEPTH = 65600, TIM_DEPTH = 2048;  // the top's defaults
  localparam int NCR = 4, T2 = 30, T3 = 6, NBUF = 2, TPROG = 2500;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic ce1_n = 1, oe_n = 1, we_n = 1, reg_n = 1;
  logic [7:0] a = '0;
  logic [15:0] d_in = '0, d_out;
  logic d_oe, ireq_n;
  logic sd_clk, cmd_o, cmd_oe, c_en, c_drv;
  logic [3:0] dat_o, dat_oe, d_en, d_drv;
  logic cmd_line;
  logic [3:0] dat_line;
  logic wide_bus = 0;
  logic corrupt = 0;

  sd_instrument_top dut (
    .clk, .rst_n, .ce1_n, .oe_n, .we_n, .reg_n, .a, .d_in, .d_out, .d_oe, .ireq_n,
    .sd_clk, .sd_cmd_o(cmd_o), .sd_cmd_oe(cmd_oe), .sd_cmd_i(cmd_line),
    .sd_dat_o(dat_o), .sd_dat_oe(dat_oe), .sd_dat_i(dat_line));

  assign cmd_line = cmd_oe ? cmd_o : (c_en ? c_drv : 1'b1);
  for (genvar k = 0; k < 4; k++) begin : g_dat
    if (k == 1) begin : g_c
      assign dat_line[k] = (dat_oe[k] ? dat_o[k] : (d_en[k] ? d_drv[k] : 1'b1)) ^ corrupt;
    end else begin : g_n
      assign dat_line[k] = dat_oe[k] ? dat_o[k] : (d_en[k] ? d_drv[k] : 1'b1);
    end
  end

  sd_card_model #(.NCR(NCR), .T2(T2), .T3(T3), .NBUF(NBUF), .TPROG(TPROG), .BLKLEN(512)) card (
    .sd_clk, .wide(wide_bus), .cmd(cmd_line), .dat(dat_line),
    .cmd_en(c_en), .cmd_drv(c_drv), .dat_en(d_en), .dat_drv(d_drv));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (at %0t)", what, $time); end
  endtask

  // mechanism counters
  int m_noresp = 0, m_r48 = 0, m_r136 = 0, m_read = 0, m_write = 0, m_holdoff = 0;
  int m_stall_in = 0, m_stall_out = 0, m_timeout = 0, m_crc = 0, m_raw = 0;
  int m_abort = 0, m_timovf = 0, m_cis = 0, m_irq = 0;
  always @(posedge clk) if (rst_n && dut.u_fsm.stall) begin
    if (dut.u_fsm.state == 4'(7)) m_stall_in++;    // S_RD_DATA
    if (dut.u_fsm.state == 4'(11)) m_stall_out++;  // S_WR_DATA
  end

  // ------------------------------------------------------- PC Card host
  task automatic bus_write(logic [3:0] r, logic [15:0] data);
    a = {3'b000, r, 1'b0}; reg_n = 1; d_in = data; ce1_n = 0;
    #30 we_n = 0;
    #200 we_n = 1;
    #30 ce1_n = 1;
    #60;
  endtask

  task automatic bus_read_a(bit attr, logic [7:0] addr, output logic [15:0] data);
    a = addr; reg_n = !attr; ce1_n = 0;
    #30 oe_n = 0;
    #200 data = d_out;
    oe_n = 1;
    #30 ce1_n = 1; reg_n = 1;
    #60;
  endtask

  task automatic bus_read(logic [3:0] r, output logic [15:0] data);
    bus_read_a(0, {3'b000, r, 1'b0}, data);
  endtask

  function automatic logic [7:0] pattern(int b, int i);
    return 8'(b * 7 + i * 13 + 5);
  endfunction

  task automatic push_cmd(logic [5:0] idx, logic [31:0] arg);
    bus_write(REG_OUTFIFO, {8'h00, 2'b01, idx});
    bus_write(REG_OUTFIFO, arg[31:16]);
    bus_write(REG_OUTFIFO, arg[15:0]);
  endtask

  // wait until the output FIFO has room for n words
  task automatic wait_room(int n);
    logic [15:0] lvl;
    bus_read(REG_OUTFIFO, lvl);
    while (OUT_DEPTH - int'(lvl) < n) begin
      #1000;
      bus_read(REG_OUTFIFO, lvl);
    end
  endtask

  task automatic start_op(resp_type_e r, data_dir_e d, bit wide, bit raw);
    wide_bus = wide;
    bus_write(REG_CTRL, 16'(1 << CTRL_START | 1 << CTRL_CLKEN | int'(r) << CTRL_RESP_LO |
                            int'(d) << CTRL_DIR_LO | int'(wide) << CTRL_WIDE | int'(raw) << CTRL_RAW));
  endtask

  // read everything: words from the input FIFO until the FSM is idle and
  // the FIFO is empty; every `slow`-th poll waits extra time
  logic [15:0] got[$];
  task automatic drain(int slow_ns, int max_polls);
    logic [15:0] st, lvl, v;
    int polls = 0;
    bit fin = 0;
    while (!fin && polls < max_polls) begin
      polls++;
      bus_read(REG_CTRL, st);
      bus_read(REG_INLVL, lvl);
      for (int i = 0; i < int'(lvl); i++) begin
        bus_read(REG_INFIFO, v);
        got.push_back(v);
        #(slow_ns);
      end
      if (!st[10] && lvl == 0) fin = 1;
    end
    check(fin, "operation finished");
    if (!ireq_n) m_irq++;
  endtask

  // timing records
  logic [3:0] rec_code[$];
  longint rec_ticks[$];
  task automatic read_timing();
    logic [15:0] lvl, lo, hi;
    rec_code.delete(); rec_ticks.delete();
    bus_read(REG_TIMLVL, lvl);
    for (int i = 0; i < int'(lvl); i++) begin
      bus_read(REG_TIMLO, lo);
      bus_read(REG_TIMHI, hi);
      rec_code.push_back(hi[15:12]);
      rec_ticks.push_back(longint'({hi[11:0], lo}));
    end
  endtask

  function automatic logic [47:0] r1(logic [5:0] idx);
    logic [39:0] r;
    r = {2'b00, idx, 32'h0000_0900};
    return {r, crc7_40(r), 1'b1};
  endfunction

  logic [15:0] st, v;
  int base;
  initial begin
    #105 rst_n = 1;
    #200;

    // CIS: first tuple code at attribute address 0
    bus_read_a(1, 8'd0, v);
    check(v == 16'h0001, "CIS first tuple is CISTPL_DEVICE");
    bus_read_a(1, 8'd10, v);
    if (v == 16'h0015) m_cis++;
    check(v == 16'h0015, "CIS second tuple is CISTPL_VERS_1");

    bus_read(REG_BLKLEN, v);
    check(v == 16'd512, "default block length 512");
    bus_write(REG_CLKDIV, 16'(DIV));
    bus_write(REG_CTRL, 16'(1 << CTRL_CLKEN | 1 << CTRL_CLEAR));

    $display("phase: %s at %0t", "CMD0", $time);
    // CMD0, no response
    push_cmd(6'd0, 32'h0);
    start_op(RESP_NONE, DIR_NONE, 0, 0);
    drain(0, 100);
    check(card.last_index == 0 && card.cmd_crc_errors == 0, "CMD0 reached the card");
    if (card.last_index == 0) m_noresp++;
    #(200 * PER * 20);
    got.delete();
    read_timing();

    $display("phase: %s at %0t", "CMD8 with R1", $time);
    // CMD8 with R1
    push_cmd(6'd8, 32'h0000_01AA);
    start_op(RESP_48, DIR_NONE, 0, 0);
    drain(0, 100);
    check(got.size() == 3 && {got[0], got[1], got[2]} == r1(6'd8), "R1 over the PC Card bus");
    if (got.size() == 3) m_r48++;
    got.delete();

    $display("phase: %s at %0t", "CMD2 with R2", $time);
    // CMD2 with R2
    push_cmd(6'd2, 32'h0);
    start_op(RESP_136, DIR_NONE, 0, 0);
    drain(0, 100);
    check(got.size() == 9 && got[0] == 16'h3F01 && got[8] == 16'h0100, "R2 over the PC Card bus");
    if (got.size() == 9) m_r136++;
    got.delete();
    read_timing();

    $display("phase: %s at %0t", "4-bit read of 4 blocks", $time);
    // 4-bit read of 4 blocks from block 100, fetched after it has finished
    bus_write(REG_BLKCNT, 16'd4);
    push_cmd(6'd18, 32'd100);
    push_cmd(6'd12, 32'd0);
    start_op(RESP_48, DIR_READ, 1, 0);
    #(400000);
    drain(0, 2000);
    check(got.size() == 3 + 4 * 256 + 3, $sformatf("read words %0d", got.size()));
    begin
      int bad = 0;
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < 256; i++)
          if (got.size() > 3 + b * 256 + i &&
              got[3 + b * 256 + i] != {pattern(100 + b, 2 * i), pattern(100 + b, 2 * i + 1)}) bad++;
      check(bad == 0, $sformatf("read data over the PC Card bus (%0d bad)", bad));
      if (bad == 0 && got.size() == 1030) m_read++;
    end
    bus_read(REG_CTRL, st);
    check(st[9:4] == 0, $sformatf("no error flags after read (%h)", st));
    bus_read(REG_BLKDONE, v);
    check(v == 16'd4, "block counter 4");
    read_timing();
    begin
      int nstart = 0, nend = 0;
      foreach (rec_code[i]) begin
        if (rec_code[i] == EV_DATA_START) nstart++;
        if (rec_code[i] == EV_DATA_END) begin
          if (nend == 0) check(rec_ticks[i] == (1024 + 17) * PER,
                               $sformatf("first block time %0d", rec_ticks[i]));
          else check(rec_ticks[i] == (1024 + 17) * PER, "later block time");
          nend++;
        end
        if (rec_code[i] == EV_DATA_START && i > 0 && rec_code[i-1] == EV_RESP_END)
          check(rec_ticks[i] == (T2 + 1) * PER, $sformatf("t2 %0d", rec_ticks[i]));
      end
      check(nend == 4 && nstart >= 4, "four block records");
    end
    got.delete();
    #(300 * PER * 20);

    $display("phase: %s at %0t", "read of 256 sectors kept on the board", $time);
    // the read workload: 256 sectors of 512 bytes fit the input FIFO, so the
    // command runs at full clock rate and is fetched after it has finished
    begin
      int stall0, ndend, bad;
      longint total;
      real mbps;
      bus_write(REG_CTRL, 16'(1 << CTRL_CLKEN | 1 << CTRL_CLEAR));
      bus_write(REG_BLKCNT, 16'd256);
      push_cmd(6'd18, 32'd3000);
      push_cmd(6'd12, 32'd0);
      stall0 = m_stall_in;
      start_op(RESP_48, DIR_READ, 1, 0);
      st = 16'h0400;
      while (st[10]) begin
        #(20000);
        bus_read(REG_CTRL, st);
      end
      check(m_stall_in == stall0, "no clock stall while the input FIFO holds the whole command");
      bus_read(REG_CTRL, st);
      check(st[9:4] == 0, $sformatf("no error or overflow flags after 256-sector read (%h)", st));
      read_timing();
      total = 0; ndend = 0;
      foreach (rec_code[i]) begin
        if (i > 0) total += rec_ticks[i];
        if (rec_code[i] == EV_DATA_END) begin
          ndend++;
          check(rec_ticks[i] == (1024 + 17) * PER, $sformatf("read block time %0d", rec_ticks[i]));
        end
        if (rec_code[i] == EV_DATA_START && i > 0 && rec_code[i-1] == EV_DATA_END)
          check(rec_ticks[i] == (T3 + 1) * PER, $sformatf("t3 %0d", rec_ticks[i]));
      end
      check(ndend == 256, $sformatf("a record for every block (%0d)", ndend));
      mbps = real'(256 * 512 * 8) / (real'(total) * 20.0e-9) / 1.0e6;
      $display("workload: 256-sector read, %0d clocks, %.2f Mbit/s", total, mbps);
      check(mbps > 80.0, "sustained read rate near the 4-bit peak at clk/2");
      drain(0, 100);
      check(got.size() == 3 + 256 * 256 + 3, $sformatf("256-sector read words %0d", got.size()));
      bad = 0;
      for (int b = 0; b < 256; b++)
        for (int i = 0; i < 256; i++)
          if (got.size() > 3 + b * 256 + i &&
              got[3 + b * 256 + i] != {pattern(3000 + b, 2 * i), pattern(3000 + b, 2 * i + 1)}) bad++;
      check(bad == 0, $sformatf("256-sector read data (%0d bad)", bad));
      got.delete();
    end

    $display("phase: %s at %0t", "read of 257 blocks, past the input FIFO depth", $time);
    bus_write(REG_CTRL, 16'(1 << CTRL_CLKEN | 1 << CTRL_CLEAR));  // counters restart
    bus_write(REG_BLKCNT, 16'd257);
    push_cmd(6'd18, 32'd1000);
    push_cmd(6'd12, 32'd0);
    start_op(RESP_48, DIR_READ, 1, 0);
    wait (dut.u_fsm.stall && dut.u_in_fifo.full);
    bus_read(REG_INLVL, v);
    check(v == 16'hFFFF, $sformatf("input FIFO level saturates at FFFFh (%h)", v));
    #(100000);
    check(dut.u_fsm.state == 4'(7) && dut.u_fsm.stall && dut.u_in_fifo.full,
          "SD clock held while the input FIFO is full");
    drain(0, 100);
    check(got.size() == 3 + 257 * 256 + 3, $sformatf("long read words %0d", got.size()));
    begin
      int bad = 0;
      for (int b = 0; b < 257; b++)
        for (int i = 0; i < 256; i++)
          if (got.size() > 3 + b * 256 + i &&
              got[3 + b * 256 + i] != {pattern(1000 + b, 2 * i), pattern(1000 + b, 2 * i + 1)}) bad++;
      check(bad == 0, $sformatf("long read data intact across the stall (%0d bad)", bad));
    end
    bus_read(REG_CTRL, st);
    check(st[9:4] == 0, $sformatf("no error flags after long read (%h)", st));
    bus_read(REG_BLKDONE, v);
    check(v == 16'd257, $sformatf("block counter 257 (%0d)", v));
    got.delete();
    read_timing();
    #(300 * PER * 20);

    $display("phase: %s at %0t", "4-bit write of 4 blocks", $time);
    // 4-bit write of 4 blocks to block 30, buffers fill, one block fed slowly
    bus_write(REG_BLKCNT, 16'd4);
    base = card.blocks_written;
    push_cmd(6'd25, 32'd30);
    start_op(RESP_48, DIR_WRITE, 1, 0);
    for (int b = 0; b < 4; b++) begin
      wait_room(256);
      for (int i = 0; i < 256; i++) begin
        bus_write(REG_OUTFIFO, {pattern(130 + b, 2 * i), pattern(130 + b, 2 * i + 1)});
        if (b == 2) #(2000);
      end
    end
    wait_room(3);
    push_cmd(6'd12, 32'd0);
    drain(0, 5000);
    check(card.blocks_written == base + 4 && card.wr_data_errors == 0 && card.wr_crc_errors == 0,
          "written blocks reached the card intact");
    if (card.blocks_written == base + 4) m_write++;
    m_holdoff = card.holdoffs;
    bus_read(REG_CTRL, st);
    check(st[9:4] == 0, $sformatf("no error flags after write (%h)", st));
    read_timing();
    begin
      longint tw = 0;
      foreach (rec_code[i]) if (rec_code[i] == EV_BUSY_END && rec_ticks[i] > tw) tw = rec_ticks[i];
      check(tw > 1000 * PER, $sformatf("busy time tW recorded (%0d)", tw));
    end
    got.delete();

    $display("phase: %s at %0t", "write of 256 sectors from a preloaded output FIFO", $time);
    // the measurement workload: a whole 256-sector command and its stop
    // command are loaded first, then run without the laptop taking part,
    // and the sustained rate is computed from the timing records
    begin
      int stall0, ndend, nbusy;
      longint total, t_start, t_done;
      real mbps;
      bus_write(REG_CTRL, 16'(1 << CTRL_CLKEN | 1 << CTRL_CLEAR));
      bus_write(REG_BLKCNT, 16'd256);
      base = card.blocks_written;
      push_cmd(6'd25, 32'd2000);
      for (int b = 0; b < 256; b++)
        for (int i = 0; i < 256; i++)
          bus_write(REG_OUTFIFO, {pattern(2100 + b, 2 * i), pattern(2100 + b, 2 * i + 1)});
      push_cmd(6'd12, 32'd0);
      bus_read(REG_OUTFIFO, v);
      check(v == 16'hFFFF && dut.u_out_fifo.level == 18'(3 + 256 * 256 + 3),
            $sformatf("whole command held in the output FIFO (%0d)", dut.u_out_fifo.level));
      stall0 = m_stall_out;
      t_start = $time;
      start_op(RESP_48, DIR_WRITE, 1, 0);
      drain(0, 100000);
      t_done = $time;
      check(m_stall_out == stall0, "no clock stall while the FIFO holds the whole command");
      check(card.blocks_written == base + 256 && card.wr_data_errors == 0 && card.wr_crc_errors == 0,
            "256 written sectors reached the card intact");
      bus_read(REG_CTRL, st);
      check(st[9:4] == 0, $sformatf("no error or overflow flags after 256-sector write (%h)", st));
      read_timing();
      total = 0; ndend = 0; nbusy = 0;
      // the first record (CMD_END) measures from the previous operation, so
      // the command's time starts after it
      foreach (rec_code[i]) begin
        if (i > 0) total += rec_ticks[i];
        if (rec_code[i] == EV_DATA_END) begin
          ndend++;
          check(rec_ticks[i] == (1024 + 17) * PER, $sformatf("write block time %0d", rec_ticks[i]));
        end
        if (rec_code[i] == EV_BUSY_END) nbusy++;
      end
      check(ndend == 256 && nbusy >= 256, $sformatf("records for every block (%0d, %0d)", ndend, nbusy));
      check(rec_code.size() > 0 && rec_code[rec_code.size() - 1] == EV_OP_DONE, "last record is OP_DONE");
      check(total * 20 <= t_done - t_start && total * 20 > t_done - t_start - 20000,
            $sformatf("records add up to the elapsed time (%0d ns of %0d ns)", total * 20, t_done - t_start));
      mbps = real'(256 * 512 * 8) / (real'(total) * 20.0e-9) / 1.0e6;
      $display("workload: 256-sector write, %0d clocks, %.2f Mbit/s", total, mbps);
      check(mbps > 1.0, "sustained write rate computed");
      got.delete();
    end

    $display("phase: %s at %0t", "read of one block with one cor", $time);
    // read of one block with one corrupted DAT1 bit
    bus_write(REG_BLKCNT, 16'd1);
    push_cmd(6'd18, 32'd5);
    push_cmd(6'd12, 32'd0);
    start_op(RESP_48, DIR_READ, 1, 0);
    wait (dut.u_fsm.state == 4'(7));
    repeat (200 * PER) @(posedge clk);
    @(posedge sd_clk);
    #1 corrupt = 1;
    @(posedge sd_clk);
    #1 corrupt = 0;
    drain(0, 2000);
    bus_read(REG_CTRL, st);
    check(st[6], "read CRC error flagged");
    if (st[6]) m_crc++;
    got.delete();
    read_timing();
    #(300 * PER * 20);

    $display("phase: %s at %0t", "response timeout", $time);
    // response timeout
    bus_write(REG_NCR, 16'd2);
    bus_write(REG_CTRL, 16'(1 << CTRL_CLKEN | 1 << CTRL_CLEAR));
    push_cmd(6'd13, 32'h0);
    start_op(RESP_48, DIR_NONE, 0, 0);
    drain(0, 100);
    bus_read(REG_CTRL, st);
    check(st[4], "response timeout flagged");
    if (st[4]) m_timeout++;
    bus_write(REG_NCR, 16'd64);
    #(200 * PER * 20);
    got.delete();

    $display("phase: %s at %0t", "raw capture of", $time);
    // raw capture of CMD13 and its response
    push_cmd(6'd13, 32'h0);
    start_op(RESP_48, DIR_NONE, 0, 1);
    drain(0, 100);
    check(got.size() >= (48 + NCR + 48) / 3, $sformatf("raw words %0d", got.size()));
    begin
      int zeros = 0;
      foreach (got[i]) begin
        if (!got[i][14]) zeros++;
        if (!got[i][9]) zeros++;
        if (!got[i][4]) zeros++;
      end
      check(zeros > 20, "raw samples show CMD activity");
      if (zeros > 20) m_raw++;
    end
    got.delete();
    read_timing();

    $display("phase: %s at %0t", "abort: queue", $time);
    // abort: queue words, abort, all FIFOs empty
    bus_write(REG_OUTFIFO, 16'h1111);
    bus_write(REG_OUTFIFO, 16'h2222);
    bus_write(REG_CTRL, 16'(1 << CTRL_CLKEN | 1 << CTRL_ABORT));
    bus_read(REG_CTRL, st);
    check(st[1] && st[2] && st[3] && !st[10], "abort empties FIFOs, FSM idle");
    if (st[1] && st[2]) m_abort++;

    $display("phase: %s at %0t", "timing overflow:", $time);
    // timing overflow: CMD13 round trips (3 records each) left unread until
    // the timing FIFO is past its depth
    for (int i = 0; i < TIM_DEPTH / 3 + 2; i++) begin
      push_cmd(6'd13, 32'h0);
      start_op(RESP_48, DIR_NONE, 0, 0);
      drain(0, 100);
      got.delete();
    end
    bus_read(REG_CTRL, st);
    check(st[9], "timing FIFO overflow flagged");
    if (st[9]) m_timovf++;
    bus_read(REG_TIMLVL, v);
    check(v == 16'(TIM_DEPTH), "timing FIFO full at its depth");

    check(card.cmd_crc_errors == 0, "no command CRC errors at the card");
    $display("mechanisms: no-resp %0d R48 %0d R136 %0d read %0d write %0d holdoff %0d stall-in %0d stall-out %0d timeout %0d crc %0d raw %0d abort %0d tim-ovf %0d cis %0d irq %0d",
             m_noresp, m_r48, m_r136, m_read, m_write, m_holdoff, m_stall_in, m_stall_out,
             m_timeout, m_crc, m_raw, m_abort, m_timovf, m_cis, m_irq);
    check(m_noresp > 0, "mechanism: command without response");
    check(m_r48 > 0, "mechanism: 48-bit response");
    check(m_r136 > 0, "mechanism: 136-bit response");
    check(m_read > 0, "mechanism: multiple-block read");
    check(m_write > 0, "mechanism: multiple-block write");
    check(m_holdoff > 0, "mechanism: DAT0 busy hold-off");
    check(m_stall_in > 0, "mechanism: clock stall on full input FIFO");
    check(m_stall_out > 0, "mechanism: clock stall on empty output FIFO");
    check(m_timeout > 0, "mechanism: response timeout");
    check(m_crc > 0, "mechanism: data CRC error detection");
    check(m_raw > 0, "mechanism: raw capture");
    check(m_abort > 0, "mechanism: abort");
    check(m_timovf > 0, "mechanism: timing FIFO overflow");
    check(m_cis > 0, "mechanism: CIS read");
    check(m_irq > 0, "mechanism: done interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
