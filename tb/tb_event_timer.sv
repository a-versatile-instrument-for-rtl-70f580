// tb_event_timer: fires events at random spacings and checks each timing
// record pushed: event code, interval equal to the number of cycles since
// the previous event, one record per event, the block counter (EV_DATA_END
// events), the record counter, saturation of a very long interval, the
// overflow flag when the FIFO reports full, and clear.
module tb_event_timer;
  import sd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, ev_valid = 0, tim_full = 0;
  event_e ev_code = EV_NONE;
  logic tim_push, overflow;
  logic [TIM_W-1:0] tim_wdata;
  logic [15:0] ev_count, blk_count;

  event_timer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [TIM_W-1:0] exp_q[$];
  logic [TIM_W-1:0] got_q[$];
  always @(negedge clk) if (rst_n && tim_push) got_q.push_back(tim_wdata);

  longint last_ev;
  longint cyc;
  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fire(event_e c);
    ev_valid <= 1; ev_code <= c;
    @(posedge clk);
    ev_valid <= 0;
  endtask

  int nblk, gap, nfire = 0;
  event_e c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // first event: interval counts from reset release
    nblk = 0;
    // one assignment per cycle: gap idle cycles, then the event
    for (int i = 0; i < 300; i++) begin
      gap = $urandom_range(0, 40);
      c = event_e'($urandom_range(1, 9));
      for (int g = 0; g < gap; g++) begin
        ev_valid <= 0;
        @(posedge clk);
      end
      if (i > 0) exp_q.push_back({c, TICKS_W'(cyc - last_ev)});
      last_ev = cyc;
      if (c == EV_DATA_END) nblk++;
      ev_valid <= 1;
      ev_code  <= c;
      nfire++;
      @(posedge clk);
    end
    ev_valid <= 0;
    @(posedge clk); @(posedge clk);
    check(got_q.size() == 300, $sformatf("one record per event (%0d of %0d)", got_q.size(), nfire));
    for (int i = 1; i < 300 && i < got_q.size(); i++)
      check(got_q[i] == exp_q[i-1], $sformatf("record %0d: got %h exp %h", i, got_q[i], exp_q[i-1]));
    check(blk_count == 16'(nblk), "block counter");
    check(ev_count == 16'd300, "record counter");
    check(!overflow, "no overflow yet");
    // saturation: force the counter near its top
    got_q.delete();
    dut.ticks = '1 - 5;
    repeat (20) @(posedge clk);
    fire(EV_BUSY_END);
    @(posedge clk); @(posedge clk);
    check(got_q.size() == 1 && got_q[0] == {EV_BUSY_END, {TICKS_W{1'b1}}}, "interval saturates");
    // overflow: FIFO full drops the record
    got_q.delete();
    tim_full <= 1;
    fire(EV_DATA_START);
    tim_full <= 0;
    @(posedge clk); @(posedge clk);
    check(got_q.size() == 0 && overflow, "record dropped and overflow flagged");
    check(ev_count == 16'd301, "dropped record not counted");
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    check(!overflow && ev_count == 0 && blk_count == 0, "clear");
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
