// tb_sd_host_fsm: drives sd_host_fsm against the behavioural SD card with
// real FIFOs on both sides. Scenarios: command without response, 48-bit and
// 136-bit responses, 4-bit multiple-block read and write (with the card's
// buffers filling so that it holds DAT0 low), 1-bit read and write, a
// response timeout, raw line capture, and slow FIFO service that forces the
// SD clock to stall. Data words, response words, card-side counters and the
// timing events are compared with values computed here; the block time, the
// read access time t2 and the read gap t3 are checked to the clock.
module tb_sd_host_fsm;
  import sd_pkg::*;

  localparam int DIV = 2;                 // SD clock = clk/6
  localparam int PER = 2 * (DIV + 1);     // system clocks per SD clock
  localparam int NCR = 4, T2 = 20, T3 = 4, NBUF = 2, TPROG = 2500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // control
  logic start = 0, abort = 0;
  op_t op = '0;
  logic [11:0] blklen = 12'd512;
  logic [15:0] blkcnt = 16'd1;
  logic [7:0] ncr_max = 8'd64;
  logic busy;
  logic [3:0] st;
  sticky_t err_set, errs;

  // FIFOs
  logic out_push = 0, out_pop, out_full, out_empty;
  logic [15:0] out_wdata = '0, out_rdata;
  logic [11:0] out_level;
  logic in_push, in_pop = 0, in_full, in_empty;
  logic [15:0] in_wdata, in_rdata;
  logic [6:0] in_level;

  sync_fifo #(.WIDTH(16), .DEPTH(2048)) u_out (
    .clk, .rst_n, .flush(1'b0), .push(out_push), .wdata(out_wdata), .pop(out_pop),
    .rdata(out_rdata), .full(out_full), .empty(out_empty), .level(out_level));
  sync_fifo #(.WIDTH(16), .DEPTH(64)) u_in (
    .clk, .rst_n, .flush(1'b0), .push(in_push), .wdata(in_wdata), .pop(in_pop),
    .rdata(in_rdata), .full(in_full), .empty(in_empty), .level(in_level));

  // SD bus with pull-ups
  logic sd_clk, cmd_o, cmd_oe, c_en, c_drv;
  logic [3:0] dat_o, dat_oe, d_en, d_drv;
  logic cmd_line;
  logic [3:0] dat_line;
  logic wide_bus = 0;
  assign cmd_line = cmd_oe ? cmd_o : (c_en ? c_drv : 1'b1);
  for (genvar k = 0; k < 4; k++)
    assign dat_line[k] = dat_oe[k] ? dat_o[k] : (d_en[k] ? d_drv[k] : 1'b1);

  logic ev_valid;
  event_e ev_code;

  sd_host_fsm dut (
    .clk, .rst_n, .start, .abort, .op, .clk_en(1'b1), .clkdiv(16'(DIV)),
    .blklen, .blkcnt, .ncr_max, .busy, .state_o(st), .err_set,
    .out_rdata, .out_empty, .out_pop, .in_full, .in_push, .in_wdata,
    .ev_valid, .ev_code, .sd_clk, .cmd_o, .cmd_oe, .cmd_i(cmd_line),
    .dat_o, .dat_oe, .dat_i(dat_line));

  sd_card_model #(.NCR(NCR), .T2(T2), .T3(T3), .NBUF(NBUF), .TPROG(TPROG), .BLKLEN(512)) card (
    .sd_clk, .wide(wide_bus), .cmd(cmd_line), .dat(dat_line),
    .cmd_en(c_en), .cmd_drv(c_drv), .dat_en(d_en), .dat_drv(d_drv));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // event log: code and system-clock timestamp
  longint cyc = 0;
  always @(posedge clk) cyc++;
  event_e evq[$];
  longint evt[$];
  always @(posedge clk) if (ev_valid) begin evq.push_back(ev_code); evt.push_back(cyc); end
  bit clr_errs = 0;
  always @(posedge clk) errs <= clr_errs ? '0 : (errs | err_set);

  // input FIFO drain: pop every `drain_gap` cycles into a queue
  logic [15:0] got[$];
  int drain_gap = 1;
  int stall_cycles = 0;
  always @(posedge clk) if (dut.stall) stall_cycles++;
  initial begin
    int n;
    forever begin
      @(posedge clk);
      n++;
      if (!in_empty && n >= drain_gap && !in_pop) begin
        in_pop <= 1;
        got.push_back(in_rdata);
        n = 0;
      end else in_pop <= 0;
    end
  end

  function automatic logic [7:0] pattern(int b, int i);
    return 8'(b * 7 + i * 13 + 5);
  endfunction

  task automatic push_word(logic [15:0] w);
    @(posedge clk);
    while (out_full) @(posedge clk);
    out_push <= 1; out_wdata <= w;
    @(posedge clk);
    out_push <= 0;
  endtask

  task automatic push_cmd(logic [5:0] idx, logic [31:0] arg);
    push_word({8'h00, 2'b01, idx});
    push_word(arg[31:16]);
    push_word(arg[15:0]);
  endtask

  task automatic push_block(int b, int gap);
    for (int i = 0; i < 256; i++) begin
      push_word({pattern(b + 100, 2 * i), pattern(b + 100, 2 * i + 1)});
      repeat (gap) @(posedge clk);
    end
  endtask

  task automatic run(resp_type_e r, data_dir_e d, bit wide, bit raw, int nblk);
    @(posedge clk);
    op <= '{resp: r, dir: d, wide: wide, raw: raw};
    blkcnt <= 16'(nblk);
    wide_bus = wide;
    got.delete(); evq.delete(); evt.delete(); clr_errs = 1;
    @(posedge clk);
    clr_errs = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
  endtask

  task automatic wait_idle(int max);
    int n = 0;
    @(posedge clk);
    while ((busy || !in_empty) && n < max) begin @(posedge clk); n++; end
    repeat (10) @(posedge clk);
    check(n < max, "operation finished in time");
  endtask

  function automatic int count_ev(event_e c);
    int n = 0;
    foreach (evq[i]) if (evq[i] == c) n++;
    return n;
  endfunction

  // interval (system clocks) between the k-th event `to` and the event before it
  function automatic longint gap_before(event_e to, int k);
    int n = 0;
    foreach (evq[i]) if (evq[i] == to) begin
      if (n == k && i > 0) return evt[i] - evt[i-1];
      n++;
    end
    return -1;
  endfunction

  function automatic logic [47:0] r1(logic [5:0] idx);
    logic [39:0] r;
    r = {2'b00, idx, 32'h0000_0900};
    return {r, crc7_40(r), 1'b1};
  endfunction

  int base_cmds, base_wr;
  initial begin
    errs = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // 1. command without response
    base_cmds = card.cmds_seen;
    push_cmd(6'd0, 32'h0);
    run(RESP_NONE, DIR_NONE, 0, 0, 0);
    wait_idle(5000);
    check(card.cmds_seen == base_cmds + 1 && card.last_index == 0, "CMD0 received");
    check(card.cmd_crc_errors == 0, "command CRC7 correct");
    check(count_ev(EV_CMD_END) == 1 && count_ev(EV_RESP_START) == 0, "no-response events");
    // card answers anyway; let it finish
    repeat (120 * PER) @(posedge clk);
    got.delete();

    // 2. 48-bit response
    push_cmd(6'd8, 32'h0000_01AA);
    run(RESP_48, DIR_NONE, 0, 0, 0);
    wait_idle(5000);
    check(got.size() == 3, $sformatf("R1 is three words (%0d)", got.size()));
    if (got.size() == 3) check({got[0], got[1], got[2]} == r1(6'd8), "R1 contents");
    check(card.last_arg == 32'h0000_01AA, "argument received");
    check(!errs.resp_crc && !errs.resp_timeout, $sformatf("no response error %b", errs));
    check(count_ev(EV_RESP_START) == 1 && count_ev(EV_RESP_END) == 1, "response events");
    // command end is logged on the falling edge that releases CMD; the card
    // waits NCR falling edges and drives its start bit on the next one,
    // sampled half a clock later
    check(gap_before(EV_RESP_START, 0) == NCR * PER + PER / 2,
          $sformatf("response delay %0d", gap_before(EV_RESP_START, 0)));
    check(gap_before(EV_RESP_END, 0) == 47 * PER, "response length 48 clocks");

    // 3. 136-bit response
    push_cmd(6'd2, 32'h0);
    run(RESP_136, DIR_NONE, 0, 0, 0);
    wait_idle(8000);
    check(got.size() == 9, $sformatf("R2 is nine words (%0d)", got.size()));
    if (got.size() == 9)
      check({got[0], got[1], got[2], got[3], got[4], got[5], got[6], got[7], got[8][15:8]} ==
            {8'h3F, 120'h0123_4567_89AB_CDEF_FEDC_BA98_7654_32, 8'h01} && got[8][7:0] == 0,
            "R2 contents");

    // 4. 4-bit multiple-block read, three blocks from block 40
    push_cmd(6'd18, 32'd40);
    push_cmd(6'd12, 32'd0);
    run(RESP_48, DIR_READ, 1, 0, 3);
    wait_idle(200000);
    check(got.size() == 3 + 3 * 256 + 3, $sformatf("read word count %0d", got.size()));
    begin
      int bad = 0;
      for (int b = 0; b < 3; b++)
        for (int i = 0; i < 256; i++)
          if (3 + b * 256 + i < got.size() &&
              got[3 + b * 256 + i] != {pattern(40 + b, 2 * i), pattern(40 + b, 2 * i + 1)}) bad++;
      check(bad == 0, $sformatf("read data (%0d bad words)", bad));
    end
    check(!errs.data_crc, "read CRC16 good");
    check(card.last_index == 12, "stop command sent");
    check(count_ev(EV_DATA_START) >= 3 && count_ev(EV_DATA_END) == 3, "three blocks");
    check(gap_before(EV_DATA_END, 0) == (1024 + 16 + 1) * PER,
          $sformatf("block time %0d", gap_before(EV_DATA_END, 0)));
    check(gap_before(EV_DATA_START, 0) == (T2 + 1) * PER,
          $sformatf("read access time t2 %0d", gap_before(EV_DATA_START, 0)));
    check(gap_before(EV_DATA_START, 1) == (T3 + 1) * PER,
          $sformatf("read gap t3 %0d", gap_before(EV_DATA_START, 1)));
    check(stall_cycles == 0, "no stall with a fast reader");
    repeat (200 * PER) @(posedge clk);

    // 5. 4-bit multiple-block write, five blocks to block 7
    base_wr = card.blocks_written;
    push_cmd(6'd25, 32'd7);
    for (int b = 0; b < 2; b++) push_block(7 + b, 0);
    run(RESP_48, DIR_WRITE, 1, 0, 5);
    for (int b = 2; b < 5; b++) push_block(7 + b, 0);
    push_cmd(6'd12, 32'd0);
    wait_idle(400000);
    check(card.blocks_written == base_wr + 5, $sformatf("five blocks written (%0d)", card.blocks_written - base_wr));
    check(card.wr_crc_errors == 0 && card.wr_data_errors == 0, "written data and CRC16 good");
    check(!errs.wr_crc_status, "CRC status tokens accepted");
    check(count_ev(EV_DATA_END) == 5, "five write blocks timed");
    check(card.holdoffs > 0, "card buffers filled (DAT0 busy hold-off)");
    begin
      longint tw = 0;
      foreach (evq[i]) if (evq[i] == EV_BUSY_END && evt[i] - evt[i-1] > tw) tw = evt[i] - evt[i-1];
      check(tw > 1000 * PER, $sformatf("long busy tW recorded (%0d)", tw));
    end
    check(gap_before(EV_DATA_END, 0) == (1024 + 16 + 1) * PER, "write block time");
    check(card.used == 0 && !busy, "stop waited for programming");

    // 6. 1-bit read and write of one block
    push_cmd(6'd18, 32'd3);
    push_cmd(6'd12, 32'd0);
    run(RESP_48, DIR_READ, 0, 0, 1);
    wait_idle(200000);
    check(got.size() == 3 + 256 + 3, "1-bit read word count");
    if (got.size() > 258) check(got[3] == {pattern(3, 0), pattern(3, 1)} &&
                                got[258] == {pattern(3, 510), pattern(3, 511)}, "1-bit read data");
    check(!errs.data_crc, "1-bit read CRC16 good");
    check(gap_before(EV_DATA_END, 0) == (4096 + 16 + 1) * PER, "1-bit block time");
    repeat (200 * PER) @(posedge clk);
    base_wr = card.blocks_written;
    push_cmd(6'd25, 32'd11);
    push_block(11, 0);
    push_cmd(6'd12, 32'd0);
    run(RESP_48, DIR_WRITE, 0, 0, 1);
    wait_idle(400000);
    check(card.blocks_written == base_wr + 1 && card.wr_crc_errors == 0 &&
          card.wr_data_errors == 0, "1-bit write");

    // 7. response timeout
    ncr_max <= 8'd2;
    push_cmd(6'd13, 32'h0);
    run(RESP_48, DIR_NONE, 0, 0, 0);
    wait_idle(5000);
    check(errs.resp_timeout && count_ev(EV_RESP_TIMEOUT) == 1, "response timeout flagged");
    ncr_max <= 8'd64;
    repeat (120 * PER) @(posedge clk);
    got.delete();

    // 8. raw capture of a command and its response
    push_cmd(6'd55, 32'h1234_5678);
    run(RESP_48, DIR_NONE, 0, 1, 0);
    wait_idle(5000);
    begin
      logic cmdbits[$];
      logic [47:0] host, resp;
      bit found_h = 0, found_r = 0;
      foreach (got[i]) begin
        cmdbits.push_back(got[i][14]);
        cmdbits.push_back(got[i][9]);
        cmdbits.push_back(got[i][4]);
      end
      host = {2'b01, 6'd55, 32'h1234_5678, crc7_40({2'b01, 6'd55, 32'h1234_5678}), 1'b1};
      resp = r1(6'd55);
      for (int s = 0; s + 48 <= cmdbits.size(); s++) begin
        bit mh, mr;
        mh = 1;
        mr = 1;
        for (int j = 0; j < 48; j++) begin
          if (cmdbits[s + j] != host[47 - j]) mh = 0;
          if (cmdbits[s + j] != resp[47 - j]) mr = 0;
        end
        if (mh) found_h = 1;
        if (mr) found_r = 1;
      end
      check(got.size() > 30, $sformatf("raw samples stored (%0d words)", got.size()));
      check(found_h, "raw samples hold the host command");
      check(found_r, "raw samples hold the card response");
    end

    // 9. slow reader and slow writer: the SD clock stalls
    drain_gap = 40;
    stall_cycles = 0;
    push_cmd(6'd18, 32'd60);
    push_cmd(6'd12, 32'd0);
    run(RESP_48, DIR_READ, 1, 0, 2);
    wait_idle(400000);
    check(stall_cycles > 0, "clock stalled on a full input FIFO");
    check(got.size() == 3 + 512 + 3 && got[3 + 256] == {pattern(61, 0), pattern(61, 1)} &&
          got[3 + 511] == {pattern(61, 510), pattern(61, 511)}, "read data intact across stalls");
    check(!errs.data_crc, "CRC good across stalls");
    drain_gap = 1;
    repeat (200 * PER) @(posedge clk);
    stall_cycles = 0;
    base_wr = card.blocks_written;
    push_cmd(6'd25, 32'd20);
    run(RESP_48, DIR_WRITE, 1, 0, 1);
    push_block(20, 30);
    push_cmd(6'd12, 32'd0);
    wait_idle(400000);
    check(stall_cycles > 0, "clock stalled on an empty output FIFO");
    check(card.blocks_written == base_wr + 1 && card.wr_data_errors == 0 &&
          card.wr_crc_errors == 0, "written data intact across stalls");

    check(card.cmd_crc_errors == 0, "all command CRCs correct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
