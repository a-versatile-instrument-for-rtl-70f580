// sync_fifo: single-clock first-in first-out buffer. The analyzer uses three
// of them: the output FIFO (commands and write data from the laptop towards
// the card), the input FIFO (responses, read data or raw line samples from
// the card towards the laptop) and the timing FIFO (event/interval records).
// Storage is a plain array with wrapping read and write pointers and an
// occupancy counter, so any depth works, not only powers of two.
// Interface: push/wdata write when not full; pop removes the head, which is
// always visible on rdata (first-word fall-through); pushes while full and
// pops while empty are ignored. level counts the stored words. flush empties
// the buffer. All in one cycle, registered on the rising clock edge.
// The FIFO roles follow the source. The default depth holds one command of
// 256 sectors of 512 bytes (65536 words) with its command and response
// words; width, depth and flush are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 65600
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int LW = $clog2(DEPTH) + 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [LW-1:0] cnt;
  logic do_push, do_pop;

  assign full    = (cnt == LW'(DEPTH));
  assign empty   = (cnt == '0);
  assign level   = cnt;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else if (flush) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= next_ptr(wp);
      if (do_pop)  rp <= next_ptr(rp);
      if (do_push && !do_pop) cnt <= cnt + 1'b1;
      else if (do_pop && !do_push) cnt <= cnt - 1'b1;
    end
  end

  initial assert (DEPTH >= 2) else $error("sync_fifo: DEPTH must be at least 2");

endmodule
