// tb_ctrl_regs: programs every setting register and reads it back, checks
// reset values, the control-word decode into the operation descriptor and
// the start/abort/clear pulses (one cycle each, start refused while the
// interface FSM is busy), sticky error flags, the done flag and irq, and
// the status word layout.
module tb_ctrl_regs;
  import sd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr = 0;
  logic [3:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic start, abort, clear, clk_en, irq;
  op_t op;
  logic [15:0] clkdiv, blkcnt;
  logic [11:0] blklen;
  logic [7:0] ncr_max;
  logic fsm_busy = 0;
  logic [3:0] fsm_state = 4'h0;
  sticky_t err_set = '0;
  logic out_full = 0, out_empty = 1, in_empty = 1, tim_empty = 1;
  logic [15:0] out_level = 16'd5, in_level = 16'd6, tim_level = 16'd7;
  logic [15:0] blk_count = 16'd8, ev_count = 16'd9;

  ctrl_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_start = 0, n_abort = 0, n_clear = 0;
  always @(posedge clk) begin
    if (rst_n && start) n_start++;
    if (rst_n && abort) n_abort++;
    if (rst_n && clear) n_clear++;
  end

  task automatic wreg(logic [3:0] a, logic [15:0] d);
    @(posedge clk);
    wr <= 1; addr <= a; wdata <= d;
    @(posedge clk);
    wr <= 0;
    #1;
  endtask


  task automatic rd(logic [3:0] a, output logic [15:0] v);
    @(posedge clk); addr <= a; #1; v = rdata;
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    rd(REG_CLKDIV, v); check(v == 16'd62, "CLKDIV reset");
    rd(REG_BLKLEN, v); check(v == 16'd512, "BLKLEN reset 512");
    rd(REG_BLKCNT, v); check(v == 16'd1, "BLKCNT reset");
    rd(REG_NCR, v);    check(v == 16'd64, "NCR reset");
    wreg(REG_CLKDIV, 16'd3);  rd(REG_CLKDIV, v); check(v == 16'd3 && clkdiv == 3, "CLKDIV");
    wreg(REG_BLKLEN, 16'd1024); rd(REG_BLKLEN, v); check(v == 16'd1024 && blklen == 1024, "BLKLEN");
    wreg(REG_BLKLEN, 16'd513); check(blklen == 512, "BLKLEN forced even");
    wreg(REG_BLKCNT, 16'd77); rd(REG_BLKCNT, v); check(v == 16'd77 && blkcnt == 77, "BLKCNT");
    wreg(REG_NCR, 16'd20);    rd(REG_NCR, v); check(v == 16'd20 && ncr_max == 20, "NCR");
    rd(REG_OUTFIFO, v); check(v == 16'd5, "output FIFO level");
    rd(REG_INLVL, v);   check(v == 16'd6, "input FIFO level");
    rd(REG_TIMLVL, v);  check(v == 16'd7, "timing FIFO level");
    rd(REG_BLKDONE, v); check(v == 16'd8, "block counter");
    rd(REG_EVCNT, v);   check(v == 16'd9, "event counter");
    // control word: start, R1b, write, wide, raw, clock on
    wreg(REG_CTRL, 16'h00FF);
    check(op.resp == RESP_48B && op.dir == data_dir_e'(2'b11) && op.wide && op.raw && clk_en,
          "control word decode");
    wreg(REG_CTRL, 16'(1 << CTRL_START | 1 << CTRL_CLKEN | 2 << CTRL_RESP_LO | 1 << CTRL_DIR_LO));
    check(op.resp == RESP_136 && op.dir == DIR_READ && !op.wide && !op.raw, "second decode");
    repeat (2) @(posedge clk);
    check(n_start == 2, $sformatf("two start pulses (%0d)", n_start));
    fsm_busy <= 1;
    wreg(REG_CTRL, 16'h0081);
    repeat (2) @(posedge clk);
    check(n_start == 2, "start refused while busy");
    // errors and done
    err_set <= 6'b000101; @(posedge clk); err_set <= '0;
    fsm_state <= 4'hA;
    @(posedge clk);
    fsm_busy <= 0;
    repeat (3) @(posedge clk);
    rd(REG_CTRL, v);
    check(v[4] && !v[5] && v[6] && v[11] && v[15:12] == 4'hA, $sformatf("status flags %h", v));
    check(irq, "irq on done");
    check(v[2] && v[1] && v[3] && !v[0], "FIFO flags in status");
    wreg(REG_CTRL, 16'(1 << CTRL_ABORT));
    repeat (2) @(posedge clk);
    check(n_abort == 1, "abort pulse");
    wreg(REG_CTRL, 16'(1 << CTRL_CLEAR));
    repeat (2) @(posedge clk);
    rd(REG_CTRL, v);
    check(n_clear == 1 && v[9:4] == 0 && !v[11] && !irq, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
