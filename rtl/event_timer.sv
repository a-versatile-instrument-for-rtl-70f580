// event_timer: the counters/timers of the analyzer. A free-running interval
// counter measures, in system-clock cycles, the time since the last
// interface event. Each event pulse from the interface FSM writes one timing
// record {event code, interval} into the timing FIFO and restarts the count,
// so successive records give the command, response, access (t2), block,
// inter-block (t3) and busy (tW) times directly. The count saturates at its
// maximum instead of wrapping. If the timing FIFO is full the record is lost
// and the sticky overflow output is raised. Two counters count the records
// written and the data blocks completed (EV_DATA_END events).
// Interface: ev_valid/ev_code in; tim_push/tim_wdata to the FIFO. The record
// is written in the cycle after the event. The record format and the clock
// used as time base are this design's choices.
module event_timer
  import sd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              ev_valid,
  input  event_e            ev_code,
  input  logic              tim_full,
  output logic              tim_push,
  output logic [TIM_W-1:0]  tim_wdata,
  output logic              overflow,
  output logic [15:0]       ev_count,
  output logic [15:0]       blk_count
);
  logic [TICKS_W-1:0] ticks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ticks     <= '0;
      tim_push  <= 1'b0;
      tim_wdata <= '0;
      overflow  <= 1'b0;
      ev_count  <= '0;
      blk_count <= '0;
    end else begin
      tim_push <= 1'b0;
      if (ev_valid) begin
        ticks     <= 1;
        tim_wdata <= {ev_code, ticks};
        if (tim_full) overflow <= 1'b1;
        else begin
          tim_push <= 1'b1;
          ev_count <= ev_count + 1'b1;
        end
        if (ev_code == EV_DATA_END) blk_count <= blk_count + 1'b1;
      end else if (ticks != '1) begin
        ticks <= ticks + 1'b1;
      end
      if (clear) begin
        overflow  <= 1'b0;
        ev_count  <= '0;
        blk_count <= '0;
      end
    end
  end
endmodule
