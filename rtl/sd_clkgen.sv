// sd_clkgen: programmable SD bus clock with stall. The SD clock is the system
// clock divided by 2*(div+1); it runs while en is high. rise and fall are
// one-cycle ticks, high in the system-clock cycle at whose end sd_clk goes
// high or low: the interface FSM samples card outputs on rise and changes its
// own outputs on fall. While stall is high the clock is held low before its
// next rising edge, which freezes the card between two clocks (used when a
// FIFO cannot accept or supply data). The divider formula and the stall
// mechanism are this design's choices.
module sd_clkgen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] div,
  input  logic        stall,
  output logic        sd_clk,
  output logic        rise,
  output logic        fall
);
  logic [15:0] cnt;
  logic at_end;

  assign at_end = (cnt >= div);
  assign rise   = en && at_end && !sd_clk && !stall;
  assign fall   = en && at_end && sd_clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      sd_clk <= 1'b0;
    end else if (!en) begin
      cnt    <= '0;
      sd_clk <= 1'b0;
    end else if (rise || fall) begin
      cnt    <= '0;
      sd_clk <= rise;
    end else if (!at_end) begin
      cnt    <= cnt + 1'b1;
    end
  end
endmodule
