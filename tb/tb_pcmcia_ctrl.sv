// tb_pcmcia_ctrl: runs asynchronous PC Card memory cycles (200 ns strobes,
// 30 ns address setup and hold, 1 ns time unit) against pcmcia_ctrl with a
// 50 MHz system clock. Checks: register writes reach the register port,
// writes to the output-FIFO address become pushes, register reads return
// the register port's value, input-FIFO reads pop in order, a timing record
// is read as low half (popping) then high half, attribute reads return CIS
// ROM bytes from even addresses, attribute writes are ignored, and the data
// pins are driven only while CE1# and OE# are low.
`timescale 1ns / 1ps
module tb_pcmcia_ctrl;
  import sd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic ce1_n = 1, oe_n = 1, we_n = 1, reg_n = 1;
  logic [7:0] a = '0;
  logic [15:0] d_in = '0, d_out;
  logic d_oe;
  logic reg_wr;
  logic [3:0] reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic out_push;
  logic [15:0] out_wdata;
  logic in_pop, tim_pop;
  logic [15:0] in_rdata;
  logic [TIM_W-1:0] tim_rdata;
  logic [5:0] cis_addr;
  logic [7:0] cis_data;

  pcmcia_ctrl #(.CIS_AW(6)) dut (.*);
  cis_rom #(.AW(6)) rom (.addr(cis_addr), .data(cis_data));

  // register port model: read value depends on the address
  assign reg_rdata = {4'hA, reg_addr, 8'h5C};
  // FIFO models: heads advance on pops
  int in_head = 0, tim_head = 0;
  assign in_rdata  = 16'h1000 + 16'(in_head);
  assign tim_rdata = {16'hBEE0 + 16'(tim_head), 16'h7000 + 16'(tim_head)};
  int n_regwr = 0, n_push = 0;
  logic [3:0] last_wa;
  logic [15:0] last_wd, last_push;
  always @(posedge clk) if (rst_n) begin
    if (in_pop) in_head++;
    if (tim_pop) tim_head++;
    if (reg_wr) begin n_regwr++; last_wa = reg_addr; last_wd = reg_wdata; end
    if (out_push) begin n_push++; last_push = out_wdata; end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int oe_bad = 0;
  always @(d_oe or ce1_n or oe_n) #0.1 if (d_oe != (!ce1_n && !oe_n)) oe_bad++;

  task automatic bus_write(bit attr, logic [7:0] addr, logic [15:0] data);
    a = addr; reg_n = !attr; d_in = data; ce1_n = 0;
    #30 we_n = 0;
    #200 we_n = 1;
    #30 ce1_n = 1; reg_n = 1;
    #60;
  endtask

  task automatic bus_read(bit attr, logic [7:0] addr, output logic [15:0] data);
    a = addr; reg_n = !attr; ce1_n = 0;
    #30 oe_n = 0;
    #200 data = d_out;
    check(d_oe, "data driven during read");
    oe_n = 1;
    #30 ce1_n = 1; reg_n = 1;
    #60;
  endtask

  initial begin
    logic [15:0] v;
    #55 rst_n = 1;
    #100;
    bus_write(0, {3'b000, REG_CLKDIV, 1'b0}, 16'h0042);
    check(n_regwr == 1 && last_wa == REG_CLKDIV && last_wd == 16'h0042, "register write");
    bus_write(0, {3'b000, REG_OUTFIFO, 1'b0}, 16'hCAFE);
    bus_write(0, {3'b000, REG_OUTFIFO, 1'b0}, 16'hF00D);
    check(n_push == 2 && last_push == 16'hF00D && n_regwr == 1, "output FIFO pushes");
    bus_read(0, {3'b000, REG_BLKLEN, 1'b0}, v);
    check(v == {4'hA, REG_BLKLEN, 8'h5C}, $sformatf("register read %h", v));
    bus_read(0, {3'b000, REG_INFIFO, 1'b0}, v);
    check(v == 16'h1000, "input FIFO first word");
    bus_read(0, {3'b000, REG_INFIFO, 1'b0}, v);
    check(v == 16'h1001 && in_head == 2, "input FIFO pops in order");
    bus_read(0, {3'b000, REG_TIMLO, 1'b0}, v);
    check(v == 16'h7000 && tim_head == 1, "timing record low half pops");
    bus_read(0, {3'b000, REG_TIMHI, 1'b0}, v);
    check(v == 16'hBEE0 && tim_head == 1, "timing record high half of same record");
    bus_read(0, {3'b000, REG_TIMLO, 1'b0}, v);
    bus_read(0, {3'b000, REG_TIMHI, 1'b0}, v);
    check(v == 16'hBEE1, "second record high half");
    // CIS: byte n at attribute address 2n
    bus_read(1, 8'd0, v);  check(v == 16'h0001, "CIS byte 0");
    bus_read(1, 8'd10, v); check(v == 16'h0015, "CIS byte 5 (VERS_1)");
    bus_read(1, 8'd18, v); check(v == 16'h0053, "CIS byte 9 ('S')");
    bus_write(1, 8'd4, 16'h1234);
    check(n_regwr == 1 && n_push == 2, "attribute write ignored");
    check(oe_bad == 0 && !d_oe, "data pins driven only during reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
